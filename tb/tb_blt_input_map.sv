// tb_blt_input_map: checks the BLt input map at its default size (K = L = 32).
//
// The block must deliver w with T*w = B_L*u, i.e. after the change of basis
// its increment equals what a serial LFSR starting from zero reaches after
// shifting in the L bits of u, most significant bit first. Both sides are
// computed here without the package: B_L*u by a bit-serial LFSR, and T as
// the Krylov matrix seeded with the first unit vector, column j being that
// vector advanced by j*L zero-input serial steps. The one-clock pipeline
// latency and the cleared output after reset are checked too.
module tb_blt_input_map;
  localparam int            K    = 32;
  localparam int            L    = 32;
  localparam logic [K-1:0]  POLY = 32'h04C1_1DB7;

  logic clk = 1'b0;
  logic rst;
  logic [L-1:0] u, u_prev;
  logic [K-1:0] w;
  logic [K-1:0] tcol [K];
  int checks = 0, failures = 0;

  blt_input_map #(.K(K), .L(L), .POLY(POLY), .PIPE(1)) dut (.clk, .rst, .u, .w);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] ser_step(logic [K-1:0] s, logic b);
    logic fb = s[K-1] ^ b;
    s = s << 1;
    if (fb) s = s ^ POLY;
    return s;
  endfunction

  function automatic logic [K-1:0] ser_word(logic [K-1:0] s, logic [L-1:0] d);
    for (int i = L - 1; i >= 0; i--) s = ser_step(s, d[i]);
    return s;
  endfunction

  function automatic logic [K-1:0] t_times(logic [K-1:0] v);
    logic [K-1:0] y = '0;
    for (int j = 0; j < K; j++) if (v[j]) y = y ^ tcol[j];
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
    logic [K-1:0] v;
    v = '0;
    v[0] = 1'b1;
    for (int j = 0; j < K; j++) begin
      tcol[j] = v;
      for (int s = 0; s < L; s++) v = ser_step(v, 1'b0);
    end
    rst = 1'b1;
    u   = '1;
    repeat (2) @(posedge clk);
    #1 check("reset clears", w, '0);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0:       u = '1;
        1:       u = '0;
        2:       u = L'(1);
        3:       u = {1'b1, {(L-1){1'b0}}};
        default: u = L'($urandom);
      endcase
      u_prev = u;
      @(posedge clk);
      #1 check("T*w = B_L*u", t_times(w), ser_word('0, u_prev));
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
