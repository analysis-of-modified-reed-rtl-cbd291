// rs_syndrome -- syndrome calculator of the RS decoder.
//
// S_i = R(alpha^i) for i = 1 .. 2t, evaluated by Horner's rule as the received
// symbols arrive (highest power first): S_i <- S_i * alpha^i + r. 2*TMAX
// accumulators work in parallel, one GF multiplier each; accumulators for
// i > 2t are computed but read as zero. After the n-th symbol of a block the
// syndromes are copied to an output register and offered to the key-equation
// solver with syn_valid; the accumulators start on the next block at once.
//
// Interface: in_valid/in_ready/in_data, one symbol per clock. If the previous
// syndromes have not been taken (syn_valid && !syn_ready), in_ready drops
// until they are: this is the decoder's only back-pressure point. apow[] are
// the field's powers of alpha from rs_field_lut. syn[0] holds S_1.
//
// The document names syndrome calculation as the first decoding stage; the
// Horner structure and the handshake are this design's choice.
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int unsigned TMAX = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,              // abandon the current block (reconfiguration)
  input  poly_t poly,
  input  m_t    m,
  input  t_t    t,
  input  len_t  n,
  input  sym_t  apow [2*TMAX+1],
  input  logic  in_valid,
  output logic  in_ready,
  input  sym_t  in_data,
  output logic  syn_valid,
  input  logic  syn_ready,
  output sym_t  syn [2*TMAX]
);
  localparam int unsigned NPAR = 2*TMAX;

  sym_t acc  [NPAR];
  sym_t prod [NPAR];
  len_t cnt_q;
  logic accept, last;

  for (genvar j = 0; j < NPAR; j++) begin : g_mul
    rs_gf_mul u_mul (.a(acc[j]), .b(apow[j+1]), .p(poly), .m(m), .y(prod[j]));
  end

  assign in_ready = !(syn_valid && !syn_ready);
  assign accept   = in_valid && in_ready;
  assign last     = (cnt_q == n - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      syn_valid <= 1'b0;
      for (int j = 0; j < NPAR; j++) begin
        acc[j] <= '0;
        syn[j] <= '0;
      end
    end else if (clear) begin
      cnt_q     <= '0;
      syn_valid <= 1'b0;
    end else begin
      if (syn_valid && syn_ready) syn_valid <= 1'b0;
      if (accept) begin
        for (int j = 0; j < NPAR; j++) begin
          // first symbol of a block restarts the sum
          acc[j] <= ((cnt_q == '0) ? '0 : prod[j]) ^ in_data;
        end
        if (last) begin
          cnt_q     <= '0;
          syn_valid <= 1'b1;
          for (int j = 0; j < NPAR; j++)
            syn[j] <= (j < 2*int'(t)) ? (prod[j] ^ in_data) : '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
