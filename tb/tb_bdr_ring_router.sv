// tb_bdr_ring_router -- self-checking test of the RING(16) router.
//
// An inner router (3,3) and a border router (7,4) run under random traffic
// (unique ids in the data field, random destinations and ages) followed by a
// drain with no arrivals. A scoreboard of held flits checks, after every
// clock: each leaving flit was held, leaves once and aged by one per clock;
// ejected flits are at their destination and at most one leaves per clock;
// the number of link flits sent through a non-productive port equals the
// reported deflections, and a deflection only happens with at least one
// group full; the occupancy equals the flits held; the oldest candidate,
// when unique and at its destination, is the one ejected; injection is taken
// exactly when an existing link is idle. During the drain the oldest flit
// must leave within four clocks (it rotates to a productive port in at most
// three), which is the livelock-freedom argument of the RING scheme.
module tb_bdr_ring_router;
  int c[2], f[2];
  bit d[2];

  tb_ring_harness #(.X(3), .Y(3)) h0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_ring_harness #(.X(7), .Y(4)) h1 (.checks(c[1]), .failures(f[1]), .done(d[1]));

  initial begin
    wait (d[0] && d[1]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1]);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end
endmodule
