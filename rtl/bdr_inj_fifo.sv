// bdr_inj_fifo -- injection queue between a processor and its router.
//
// Flits the processor generates wait here until the router can inject them,
// which under the deflection rules is when at least one of the router's
// incoming links is idle. The queue is modelled as unbounded in the routing
// scheme; this design uses a circular buffer of DEPTH entries (DEPTH a power
// of two) and back-pressures the processor with push_ready when it is full.
//
// Interface: push_valid/push_ready/push_flit on the processor side; the head
// flit is pop_flit with pop_flit.valid set when the queue is not empty, and
// pop_ready (from the router) removes it at the clock edge. No bypass: a
// pushed flit can leave one clock later at the earliest.
module bdr_inj_fifo
  import bdr_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_valid,
  output logic  push_ready,
  input  flit_t push_flit,
  output flit_t pop_flit,
  input  logic  pop_ready,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  flit_t         mem [DEPTH];
  logic [AW:0]   wr_ptr, rd_ptr;
  logic          empty, full, push, pop;

  assign empty      = (wr_ptr == rd_ptr);
  assign full       = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign push_ready = !full;
  assign push       = push_valid && !full;
  assign pop        = pop_ready && !empty;
  assign level      = wr_ptr - rd_ptr;

  always_comb begin
    pop_flit       = mem[rd_ptr[AW-1:0]];
    pop_flit.valid = !empty;
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= push_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // The router must not pop an empty queue.
  always_ff @(posedge clk) begin
    if (rst_n) a_no_pop_empty: assert (!(pop_ready && empty));
  end
endmodule
