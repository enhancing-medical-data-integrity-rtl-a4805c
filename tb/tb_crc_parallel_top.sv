// tb_crc_parallel_top: end-to-end test of the parallel CRC at its defaults
// (CRC-32 generator, 32 state bits, 32 input bits per clock, one pipeline
// stage on each side of the loop).
//
// A bit-serial LFSR model, which knows nothing of the transformed state,
// follows the same word stream and its remainder is compared with crc on
// every clock, LATENCY = 2 clocks later. The stream holds an all-zero and
// an all-ones run, random words, and restarts by reset in mid-message; after
// each reset the output must show the initial value until the pipeline has
// refilled. Counted mechanisms: words consumed, mid-stream restarts,
// refill cycles; one that never happens counts as a failure.
module tb_crc_parallel_top;
  localparam int           K       = 32;
  localparam int           L       = 32;
  localparam logic [K-1:0] POLY    = 32'h04C1_1DB7;
  localparam logic [K-1:0] INIT    = 32'hFFFF_FFFF;
  localparam int           LATENCY = 2;

  logic clk = 1'b0;
  logic rst;
  logic [L-1:0] din;
  logic [K-1:0] crc;
  logic [K-1:0] model;
  logic [K-1:0] expq [$];
  int checks = 0, failures = 0;
  int n_words = 0, n_restarts = 0, n_refill = 0;

  crc_parallel_top dut (.clk, .rst, .din, .crc);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] ser_word(logic [K-1:0] s, logic [L-1:0] d);
    for (int i = L - 1; i >= 0; i--) begin
      logic fb;
      fb = s[K-1] ^ d[i];
      s  = s << 1;
      if (fb) s = s ^ POLY;
    end
    return s;
  endfunction

  task automatic check(string what, logic [K-1:0] got, logic [K-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One clock: apply reset or a word, then compare crc with the model value
  // of LATENCY clocks before.
  task automatic cycle(logic r, logic [L-1:0] d);
    rst = r;
    din = d;
    @(posedge clk);
    if (r) begin
      model = INIT;
      expq.delete();
      for (int i = 0; i < LATENCY; i++) expq.push_back(INIT);
    end else begin
      model = ser_word(model, d);
      n_words++;
      expq.push_back(model);
    end
    #1;
    if (!r) begin
      if (expq.size() > 0) begin
        logic [K-1:0] e;
        e = expq.pop_front();
        if (e == INIT && n_refill < 1000) n_refill++;
        check("crc", crc, e);
      end
    end else begin
      check("crc during reset", crc, INIT);
    end
  endtask

  initial begin
    model = INIT;
    cycle(1'b1, '0);
    cycle(1'b1, '0);
    // A short message, then a fresh reset.
    cycle(1'b0, 32'h3132_3334);
    cycle(1'b0, 32'h0);
    cycle(1'b0, 32'h0);
    cycle(1'b1, '0);
    // Runs of zeros and ones, then random words with occasional restarts.
    for (int n = 0; n < 8; n++) cycle(1'b0, '0);
    for (int n = 0; n < 8; n++) cycle(1'b0, '1);
    for (int n = 0; n < 3000; n++) begin
      if (n % 997 == 500) begin
        cycle(1'b1, L'($urandom));
        n_restarts++;
      end else begin
        cycle(1'b0, L'($urandom));
      end
    end
    if (n_words == 0)    begin failures++; $display("FAIL no words consumed"); end
    if (n_restarts == 0) begin failures++; $display("FAIL no mid-stream restart"); end
    if (n_refill == 0)   begin failures++; $display("FAIL no pipeline refill seen"); end
    $display("words=%0d restarts=%0d refill_cycles=%0d", n_words, n_restarts, n_refill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
