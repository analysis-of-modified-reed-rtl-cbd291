// rs_delay_fifo -- received-symbol delay buffer of the RS decoder.
//
// The decoder only knows a block's corrections after the whole block has
// passed the syndrome stage and the key-equation solver has run, so every
// received symbol is parked here until the Chien search reaches it. It is a
// circular buffer in a DEPTH-entry memory with write and read pointers; the
// read port is asynchronous so the popped symbol meets its correction in the
// same clock.
//
// At most three blocks are in flight (one accumulating syndromes, one in the
// key-equation solver, one being corrected), i.e. 3 * 255 = 765 symbols for
// GF(2^8), so DEPTH = 1024 never overflows. Assertions flag a push into a full
// buffer or a pop from an empty one. The buffer itself is implied by the
// document's decoder pipeline; its organisation and size are a design choice.
module rs_delay_fifo
  import rs_pkg::*;
#(
  parameter int unsigned DEPTH = 1024          // power of two
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic push,
  input  sym_t wdata,
  input  logic pop,
  output sym_t rdata,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  sym_t mem [DEPTH];
  logic [AW:0] wp_q, rp_q;

  assign level = wp_q - rp_q;
  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign rdata = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else if (clear) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (push) wp_q <= wp_q + 1'b1;
      if (pop)  rp_q <= rp_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp_q[AW-1:0]] <= wdata;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clear) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clear) pop |-> !empty);

endmodule
