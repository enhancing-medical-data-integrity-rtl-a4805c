// clt_output_map: the C_Lt block of the transformed parallel LFSR.
//
// Converts the transformed state back to the ordinary LFSR state,
// y = CLt * xt with CLt = T. Since the LFSR state is the running remainder
// of the message divided by the generator polynomial, y is the CRC (or the
// parity of a BCH code word) of everything consumed so far. Each output bit
// is an XOR of state bits chosen by one row of T, a constant computed by the
// package. Like the input map it sits outside the loop, so PIPE register
// stages may follow it; they reset to RST_Y, which should equal T times the
// loop's reset state (the LFSR's initial value). The matrix follows the
// document; the pipeline and its reset value are this design's choices.
//
// Interface: clk, rst (synchronous, active high), xt[K-1:0] in, y[K-1:0] out.
// Timing: y follows xt after PIPE clocks (combinational for PIPE=0).
module clt_output_map
  import lfsr_ss_pkg::*;
#(
  parameter int           K     = 32,
  parameter int           L     = 32,
  parameter logic [K-1:0] POLY  = 32'h04C1_1DB7,
  parameter int           PIPE  = 1,
  parameter logic [K-1:0] RST_Y = '1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] xt,
  output logic [K-1:0] y
);

  localparam gf2_mat_t T_ROWS = transpose(t_mat(gf2_vec_t'(POLY), K, L), K, K);

  logic [K-1:0] y_comb;

  always_comb begin
    for (int r = 0; r < K; r++) y_comb[r] = ^(T_ROWS[r][K-1:0] & xt);
  end

  if (PIPE == 0) begin : g_comb
    assign y = y_comb;
  end else begin : g_pipe
    logic [PIPE-1:0][K-1:0] stage;
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int s = 0; s < PIPE; s++) stage[s] <= RST_Y;
      end else begin
        stage[0] <= y_comb;
        for (int s = 1; s < PIPE; s++) stage[s] <= stage[s-1];
      end
    end
    assign y = stage[PIPE-1];
  end

endmodule
