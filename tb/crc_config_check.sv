// crc_config_check: drives one configuration of crc_parallel_top with a
// stream of words and compares crc on every clock with a bit-serial LFSR
// model of the same generator, LATENCY = PIPE_B + PIPE_C clocks later.
// The stream holds restarts by reset. Results are reported through
// checks/failures/done.
module crc_config_check #(
  parameter int           K      = 32,
  parameter int           L      = 32,
  parameter logic [K-1:0] POLY   = 32'h04C1_1DB7,
  parameter logic [K-1:0] INIT   = '1,
  parameter int           PIPE_B = 1,
  parameter int           PIPE_C = 1,
  parameter int           WORDS  = 500
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LATENCY = PIPE_B + PIPE_C;

  logic rst;
  logic [L-1:0] din;
  logic [K-1:0] crc;
  logic [K-1:0] model;
  logic [K-1:0] expq [$];

  crc_parallel_top #(.K(K), .L(L), .POLY(POLY), .INIT(INIT), .PIPE_B(PIPE_B), .PIPE_C(PIPE_C))
    dut (.clk, .rst, .din, .crc);

  function automatic logic [K-1:0] ser_word(logic [K-1:0] s, logic [L-1:0] d);
    for (int i = L - 1; i >= 0; i--) begin
      logic fb;
      fb = s[K-1] ^ d[i];
      s  = s << 1;
      if (fb) s = s ^ POLY;
    end
    return s;
  endfunction

  function automatic logic [L-1:0] rand_word();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return L'(r);
  endfunction

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
      expq.push_back(model);
    end
    #1;
    checks++;
    if (r) begin
      if (crc !== INIT) begin failures++; $display("FAIL K=%0d L=%0d reset value %h", K, L, crc); end
    end else begin
      logic [K-1:0] e;
      e = expq.pop_front();
      if (crc !== e) begin failures++; $display("FAIL K=%0d L=%0d got %h expected %h", K, L, crc, e); end
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    model = INIT;
    cycle(1'b1, '0);
    cycle(1'b1, '0);
    for (int n = 0; n < WORDS; n++) cycle(n % 211 == 100, rand_word());
    done = 1'b1;
  end
endmodule
