// blt_input_map: the B_Lt block of the transformed parallel LFSR.
//
// Each clock it takes one L-bit slice of the message and forms the K-bit
// state increment w = BLt * u, where BLt = T^-1 * B_L is the input matrix of
// the transformed state-space equation xt(mL+L) = ALt xt(mL) + BLt u_L(mL).
// Every output bit is the XOR of the input bits selected by one row of the
// constant matrix, which the package computes from the generator polynomial
// at elaboration. This path lies outside the feedback loop, so it can be
// pipelined freely: PIPE register stages (cleared by reset) follow the XOR
// network. The matrix and its place in the architecture follow the
// document; the pipeline depth, the reset value of the stages and the bit
// order (din[L-1] is the first message bit) are this design's choices.
//
// Interface: clk, rst (synchronous, active high), u[L-1:0] in, w[K-1:0] out.
// Timing: w is valid PIPE clocks after u is sampled (combinational for PIPE=0).
module blt_input_map
  import lfsr_ss_pkg::*;
#(
  parameter int          K    = 32,
  parameter int          L    = 32,
  parameter logic [K-1:0] POLY = 32'h04C1_1DB7,
  parameter int          PIPE = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [L-1:0] u,
  output logic [K-1:0] w
);

  localparam gf2_mat_t BLT_ROWS = transpose(blt_mat(gf2_vec_t'(POLY), K, L), K, L);

  logic [K-1:0] w_comb;

  always_comb begin
    for (int r = 0; r < K; r++) w_comb[r] = ^(BLT_ROWS[r][L-1:0] & u);
  end

  if (PIPE == 0) begin : g_comb
    assign w = w_comb;
  end else begin : g_pipe
    logic [PIPE-1:0][K-1:0] stage;
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int s = 0; s < PIPE; s++) stage[s] <= '0;
      end else begin
        stage[0] <= w_comb;
        for (int s = 1; s < PIPE; s++) stage[s] <= stage[s-1];
      end
    end
    assign w = stage[PIPE-1];
  end

endmodule
