// tb_bch_encoder: self-checking testbench for the shortened BCH encoder.
//
// Random data words are shifted in back to back. For each word the testbench
// forms the codeword data || parity and evaluates it at alpha^1 .. alpha^2T
// with its own field arithmetic: every value must be zero, which pins the
// parity down uniquely. It also checks that parity_valid comes exactly one
// cycle after the last data bit and that an all-zero word gives zero parity.
module tb_bch_encoder;
  import gf_pkg::*;

  localparam int M = 11, N = 1410, K = 1311, T = 9, PRIM = 'h805;
  localparam int R = N - K;
  localparam int WORDS = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_bit = 1'b0;
  logic parity_valid;
  logic [R-1:0] parity;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bch_encoder #(.M(M), .N(N), .K(K), .T(T), .PRIM(PRIM)) dut (.*);

  logic [K-1:0] data [WORDS];
  int           pv_cycle [WORDS];
  logic [R-1:0] par_got [WORDS];
  int           last_cycle [WORDS];
  int           cyc = 0;
  int           npar = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && parity_valid && npar < WORDS) begin
      par_got[npar]  <= parity;
      pv_cycle[npar] <= cyc;
      npar           <= npar + 1;
    end
  end

  // r(alpha^j) for the codeword data || parity, highest degree first
  function automatic gf_t eval_cw(input logic [K-1:0] d, input logic [R-1:0] p, input int j);
    gf_t s = '0;
    gf_t a = gf_alpha(j, M, PRIM);
    for (int i = K - 1; i >= 0; i--) s = gf_mul(s, a, M, PRIM) ^ gf_t'(d[i]);
    for (int i = R - 1; i >= 0; i--) s = gf_mul(s, a, M, PRIM) ^ gf_t'(p[i]);
    return s;
  endfunction

  initial begin
    for (int w = 0; w < WORDS; w++)
      for (int i = 0; i < K; i++) data[w][i] = (w == 0) ? 1'b0 : 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int w = 0; w < WORDS; w++) begin
      for (int i = K - 1; i >= 0; i--) begin
        in_valid <= 1'b1;
        in_bit   <= data[w][i];
        @(posedge clk);
      end
      last_cycle[w] = cyc;  // edge at which the last bit is sampled
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (npar != WORDS) begin
      failures++;
      $display("FAIL: %0d parity words seen, expected %0d", npar, WORDS);
    end
    for (int w = 0; w < npar; w++) begin
      for (int j = 1; j <= 2 * T; j++) begin
        checks++;
        if (eval_cw(data[w], par_got[w], j) != '0) begin
          failures++;
          $display("FAIL: word %0d codeword not zero at alpha^%0d", w, j);
        end
      end
      checks++;
      if (pv_cycle[w] != last_cycle[w] + 1) begin
        failures++;
        $display("FAIL: word %0d parity at cycle %0d, last bit at %0d", w, pv_cycle[w], last_cycle[w]);
      end
    end
    checks++;
    if (par_got[0] != '0) begin
      failures++;
      $display("FAIL: zero word gave nonzero parity");
    end
    checks++;
    if (par_got[1] == '0) begin
      failures++;
      $display("FAIL: random word gave zero parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
