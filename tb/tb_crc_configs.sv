// tb_crc_configs: runs the parallel CRC in several shapes besides the
// default, each against a bit-serial model: byte-wide CRC-32 with the
// CRC-32/MPEG-2 check value of "123456789" (0x0376E6E7), a 64-bit-wide
// CRC-32 without pipelining, a 16-bit-wide CRC-32 with a two-stage output
// pipeline, an 8-bit LFSR (generator x^8+x^4+x^3+x+1) taking 3 bits per clock,
// where the loop taps differ from the generator, and the 12-bit arrangement
// (12 state bits, 12 input bits) with the CRC-12 generator.
module tb_crc_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c [5], f [5];
  logic d [5];
  int checks = 0, failures = 0;

  crc_config_check #(.K(32), .L(64), .PIPE_B(0), .PIPE_C(0)) c_w64 (.clk, .checks(c[0]), .failures(f[0]), .done(d[0]));
  crc_config_check #(.K(32), .L(16), .PIPE_B(1), .PIPE_C(2)) c_w16 (.clk, .checks(c[1]), .failures(f[1]), .done(d[1]));
  crc_config_check #(.K(8), .L(3), .POLY(8'h1B), .INIT(8'h00), .PIPE_B(2), .PIPE_C(0)) c_k8 (.clk, .checks(c[2]), .failures(f[2]), .done(d[2]));
  crc_config_check #(.K(12), .L(12), .POLY(12'h80F), .INIT(12'hFFF)) c_k12 (.clk, .checks(c[3]), .failures(f[3]), .done(d[3]));

  // Byte-wide CRC-32 on the standard check string.
  logic        rst8;
  logic [7:0]  din8;
  logic [31:0] crc8;
  crc_parallel_top #(.L(8)) dut8 (.clk, .rst(rst8), .din(din8), .crc(crc8));

  initial begin
    byte msg [9] = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    c[4] = 0;
    f[4] = 0;
    d[4] = 1'b0;
    rst8 = 1'b1;
    din8 = '0;
    repeat (2) @(posedge clk);
    #1 rst8 = 1'b0;
    foreach (msg[i]) begin
      din8 = msg[i];
      @(posedge clk);
      #1;
    end
    din8 = 8'hEE;          // words after the message do not reach crc in time
    repeat (2) @(posedge clk);
    #1;
    c[4]++;
    if (crc8 !== 32'h0376_E6E7) begin
      f[4]++;
      $display("FAIL check string: got %h expected 0376e6e7", crc8);
    end
    d[4] = 1'b1;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
