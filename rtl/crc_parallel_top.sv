// crc_parallel_top: L-bit parallel CRC / LFSR in transformed state space.
//
// A serial LFSR divides the message polynomial u(x) x^K by g(x) one bit per
// clock. This circuit consumes L message bits per clock. Written directly,
// the L-step update x <= A^L x ^ B_L u puts a dense matrix A^L inside the
// feedback loop. Here the state is instead kept in a transformed basis,
// x = T xt, chosen so that the loop matrix ALt = T^-1 A^L T is a companion
// matrix: the loop is once more a plain LFSR ring with at most two XOR
// levels. All the dense logic moves to the feed-forward side: BLt = T^-1 B_L
// in front of the loop and CLt = T behind it. Those two blocks may be
// pipelined, which is how the loop, not the matrices, sets the clock rate.
//
//   din --> blt_input_map (BLt, PIPE_B stages) --> companion_loop (ALt)
//       --> clt_output_map (T, PIPE_C stages) --> crc
//
// The defaults give the CRC-32 arrangement: 32 state bits, 32 input bits
// per clock, ports clk, rst, din and crc. The generator 0x04C11DB7 and the
// all-ones initial value are those of the common CRC-32 and are this
// design's choice; so are the pipeline depths. The remainder is not
// reflected or complemented, so for whole messages the output equals the
// CRC-32/MPEG-2 value. The matrices are derived at elaboration for any
// POLY, K and L up to 64 for which A^L is similar to a companion matrix
// (true for an irreducible generator whenever L is a power of two, and for
// most other cases); otherwise elaboration stops with a fatal error.
//
// Interface: synchronous active-high rst restarts the computation from INIT.
// After rst falls, one L-bit word is taken on every rising clock edge,
// din[L-1] being the earliest message bit. crc shows the remainder of all
// words taken up to and including the one sampled PIPE_B + PIPE_C edges
// earlier (LATENCY); while the pipeline refills after reset it shows INIT.
module crc_parallel_top
  import lfsr_ss_pkg::*;
#(
  parameter int           K      = 32,
  parameter int           L      = 32,
  parameter logic [K-1:0] POLY   = 32'h04C1_1DB7,
  parameter logic [K-1:0] INIT   = '1,
  parameter int           PIPE_B = 1,
  parameter int           PIPE_C = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [L-1:0] din,
  output logic [K-1:0] crc
);

  localparam logic [K-1:0] COEF    = K'(alt_coef(gf2_vec_t'(POLY), K, L));
  localparam logic [K-1:0] XT_INIT = K'(xt_init(gf2_vec_t'(POLY), K, L, gf2_vec_t'(INIT)));

  if (K < 2 || K > MAXD || L < 1 || L > MAXD) begin : g_bad_size
    $fatal(1, "crc_parallel_top: K and L must lie in 2..%0d", MAXD);
  end
  if (t_seed(gf2_vec_t'(POLY), K, L) < 0 || !alt_is_companion(gf2_vec_t'(POLY), K, L))
  begin : g_bad_poly
    $fatal(1, "crc_parallel_top: A^L is not similar to a companion matrix for this POLY");
  end

  logic [K-1:0] w;
  logic [K-1:0] xt;
  logic         rst_loop;

  // The loop must not advance on the empty words that leave the BLt pipeline
  // after reset, so its reset is held for PIPE_B more clocks.
  if (PIPE_B == 0) begin : g_rst_now
    assign rst_loop = rst;
  end else begin : g_rst_dly
    logic [PIPE_B-1:0] rst_q;
    always_ff @(posedge clk) begin
      if (PIPE_B == 1) rst_q <= rst;
      else             rst_q <= PIPE_B'({rst_q, rst});
    end
    assign rst_loop = rst | rst_q[PIPE_B-1];
  end

  blt_input_map #(.K(K), .L(L), .POLY(POLY), .PIPE(PIPE_B)) u_blt (
    .clk(clk), .rst(rst), .u(din), .w(w)
  );

  companion_loop #(.K(K), .COEF(COEF), .XT_INIT(XT_INIT)) u_loop (
    .clk(clk), .rst(rst_loop), .w(w), .xt(xt)
  );

  clt_output_map #(.K(K), .L(L), .POLY(POLY), .PIPE(PIPE_C), .RST_Y(INIT)) u_clt (
    .clk(clk), .rst(rst), .xt(xt), .y(crc)
  );

  // Whatever the pipeline depths, the clock after a reset shows INIT.
  a_reset_shows_init: assert property (@(posedge clk) rst |=> crc == INIT)
    else $error("crc_parallel_top: crc is not INIT after reset");

endmodule
