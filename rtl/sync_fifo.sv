// sync_fifo: small single-clock first-in first-out buffer.
//
// Used to hold the measured Probe samples while the matching Forward and
// Reflected samples pass through the correction and virtual-probe units.
// Storage is a register array of DEPTH words (DEPTH a power of two) with
// read and write pointers one bit wider than the address. push is ignored
// when full and pop when empty; rd_data shows the oldest word whenever
// empty is low (first-word fall-through). full/empty are registered-state
// functions, valid in the same cycle as the pointers.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;

  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push && !full) wr_ptr <= wr_ptr + 1'b1;
      if (pop && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $fatal(1, "sync_fifo: DEPTH must be a power of two, at least 2");
  end

endmodule
