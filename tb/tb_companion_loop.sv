// tb_companion_loop: checks the companion-form feedback loop.
//
// An 8-bit loop with taps 0x1B and a non-zero reset state is driven with
// random increments. The expected next state is formed by an explicit
// companion matrix (sub-diagonal ones, taps in the last column) multiplied
// by the current state, plus the increment, and compared on every clock.
// A reset in the middle of the run must reload the reset state.
module tb_companion_loop;
  localparam int           K    = 8;
  localparam logic [K-1:0] COEF = 8'h1B;
  localparam logic [K-1:0] XT0  = 8'hA5;

  logic clk = 1'b0;
  logic rst;
  logic [K-1:0] w, xt;
  logic [K-1:0] model;
  int checks = 0, failures = 0;

  companion_loop #(.K(K), .COEF(COEF), .XT_INIT(XT0)) dut (.clk, .rst, .w, .xt);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] comp_mul(logic [K-1:0] x);
    logic [K-1:0] m [K];   // m[r] = row r
    logic [K-1:0] y;
    for (int r = 0; r < K; r++) begin
      m[r] = '0;
      if (r > 0) m[r][r-1] = 1'b1;
      m[r][K-1] = COEF[r];
    end
    for (int r = 0; r < K; r++) y[r] = ^(m[r] & x);
    return y;
  endfunction

  task automatic check(string what, logic [K-1:0] got, logic [K-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    w   = '0;
    repeat (2) @(posedge clk);
    #1 check("reset", xt, XT0);
    model = XT0;
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      w = (n % 7 == 0) ? '0 : K'($urandom);
      if (n == 200) rst = 1'b1;
      @(posedge clk);
      model = rst ? XT0 : (comp_mul(model) ^ w);
      #1 check("step", xt, model);
      rst = 1'b0;
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
