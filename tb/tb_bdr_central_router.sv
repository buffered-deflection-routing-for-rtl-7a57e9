// tb_bdr_central_router -- self-checking test of the CENTRAL(NB,B) router.
//
// Three routers run side by side under random traffic (see
// tb_central_harness for the checks): CENTRAL(16,8) at an inner mesh
// position, CENTRAL(16,ALL) at a border position and CENTRAL(16,4) in a
// corner, which has only two links.
module tb_bdr_central_router;
  int c[3], f[3];
  bit d[3];
  int checks, failures;

  tb_central_harness #(.NB(16), .B(8), .X(3), .Y(3)) h0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_central_harness #(.NB(16), .B(0), .X(7), .Y(4)) h1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  tb_central_harness #(.NB(16), .B(4), .X(0), .Y(0)) h2 (.checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
