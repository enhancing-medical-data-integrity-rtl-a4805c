// tb_clt_output_map: checks the CLt (= T) output map at its default size.
//
// T is rebuilt here without the package, as the Krylov matrix seeded with
// the first unit vector, column j being that vector advanced by j*L
// zero-input steps of a bit-serial LFSR. Random states are applied and the
// registered output must equal T*xt one clock later; during reset the
// output must show RST_Y.
module tb_clt_output_map;
  localparam int            K    = 32;
  localparam int            L    = 32;
  localparam logic [K-1:0]  POLY = 32'h04C1_1DB7;
  localparam logic [K-1:0]  RSTY = 32'hFFFF_FFFF;

  logic clk = 1'b0;
  logic rst;
  logic [K-1:0] xt, xt_prev, y;
  logic [K-1:0] tcol [K];
  int checks = 0, failures = 0;

  clt_output_map #(.K(K), .L(L), .POLY(POLY), .PIPE(1), .RST_Y(RSTY)) dut (.clk, .rst, .xt, .y);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] ser_step(logic [K-1:0] s, logic b);
    logic fb = s[K-1] ^ b;
    s = s << 1;
    if (fb) s = s ^ POLY;
    return s;
  endfunction

  function automatic logic [K-1:0] t_times(logic [K-1:0] v);
    logic [K-1:0] r = '0;
    for (int j = 0; j < K; j++) if (v[j]) r = r ^ tcol[j];
    return r;
  endfunction

  task automatic check(string what, logic [K-1:0] got, logic [K-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [K-1:0] v;
    v = '0;
    v[0] = 1'b1;
    for (int j = 0; j < K; j++) begin
      tcol[j] = v;
      for (int s = 0; s < L; s++) v = ser_step(v, 1'b0);
    end
    rst = 1'b1;
    xt  = '0;
    repeat (2) @(posedge clk);
    #1 check("reset value", y, RSTY);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      xt = (n < K) ? (K'(1) << n) : K'($urandom);
      xt_prev = xt;
      @(posedge clk);
      #1 check("y = T*xt", y, t_times(xt_prev));
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
