// companion_loop: the feedback loop of the transformed parallel LFSR.
//
// Holds the K-bit transformed state xt and updates it once per clock as
// xt <= ALt * xt ^ w, where ALt is a companion matrix: ones on the
// sub-diagonal and the tap vector COEF in its last column. In circuit terms
// this is the serial LFSR ring again: stage i takes stage i-1, XORs in the
// top stage when tap COEF[i] is set, and XORs in the external increment
// w[i]. The loop therefore holds at most two XOR levels, whatever the
// parallelism L, which is the point of the transformation. Structure and
// taps follow the document; the synchronous reset to XT_INIT is this
// design's choice.
//
// Interface: clk, rst (synchronous, active high, loads XT_INIT),
// w[K-1:0] increment in, xt[K-1:0] state out (a register output).
module companion_loop #(
  parameter int           K       = 32,
  parameter logic [K-1:0] COEF    = 32'h04C1_1DB7,
  parameter logic [K-1:0] XT_INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] w,
  output logic [K-1:0] xt
);

  logic [K-1:0] xt_next;
  logic         top;

  assign top = xt[K-1];

  always_comb begin
    xt_next[0] = (COEF[0] & top) ^ w[0];
    for (int i = 1; i < K; i++) xt_next[i] = xt[i-1] ^ (COEF[i] & top) ^ w[i];
  end

  always_ff @(posedge clk) begin
    if (rst) xt <= XT_INIT;
    else     xt <= xt_next;
  end

endmodule
