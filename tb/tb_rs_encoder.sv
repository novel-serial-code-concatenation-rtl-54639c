// tb_rs_encoder: self-checking testbench for the shortened Reed-Solomon
// encoder. Random data words (and one all-zero word) are encoded back to back;
// the testbench evaluates each codeword data || parity at alpha^FCR ..
// alpha^(FCR+NPAR-1) with its own field arithmetic and requires zero, and
// checks that parity_valid follows the last data symbol by one cycle.
module tb_rs_encoder;
  import gf_pkg::*;

  localparam int M = 9, N = 432, K = 396, PRIM = 'h211, FCR = 1;
  localparam int NPAR = N - K;
  localparam int WORDS = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [M-1:0] in_sym = '0;
  logic parity_valid;
  logic [NPAR-1:0][M-1:0] parity;
  always #5 clk = ~clk;

  rs_encoder #(.M(M), .N(N), .K(K), .PRIM(PRIM), .FCR(FCR)) dut (.*);

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int npar = 0;
  logic [K-1:0][M-1:0]    data [WORDS];
  logic [NPAR-1:0][M-1:0] got [WORDS];
  int pv_cycle [WORDS];
  int last_cycle [WORDS];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && parity_valid && npar < WORDS) begin
      got[npar]      <= parity;
      pv_cycle[npar] <= cyc;
      npar           <= npar + 1;
    end
  end

  function automatic gf_t eval_cw(input logic [K-1:0][M-1:0] d, input logic [NPAR-1:0][M-1:0] p,
                                  input int j);
    gf_t s = '0;
    gf_t a = gf_alpha(j, M, PRIM);
    for (int i = K - 1; i >= 0; i--) s = gf_mul(s, a, M, PRIM) ^ gf_t'(d[i]);
    for (int i = NPAR - 1; i >= 0; i--) s = gf_mul(s, a, M, PRIM) ^ gf_t'(p[i]);
    return s;
  endfunction

  initial begin
    for (int w = 0; w < WORDS; w++)
      for (int i = 0; i < K; i++) data[w][i] = (w == 0) ? '0 : M'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int w = 0; w < WORDS; w++) begin
      for (int i = K - 1; i >= 0; i--) begin
        in_valid <= 1'b1;
        in_sym   <= data[w][i];
        @(posedge clk);
      end
      last_cycle[w] = cyc;
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (npar != WORDS) begin
      failures++;
      $display("FAIL: %0d parity words, expected %0d", npar, WORDS);
    end
    for (int w = 0; w < npar; w++) begin
      for (int j = FCR; j < FCR + NPAR; j++) begin
        checks++;
        if (eval_cw(data[w], got[w], j) != '0) begin
          failures++;
          $display("FAIL: word %0d not zero at alpha^%0d", w, j);
        end
      end
      checks++;
      if (pv_cycle[w] != last_cycle[w] + 1) begin
        failures++;
        $display("FAIL: word %0d parity timing %0d vs %0d", w, pv_cycle[w], last_cycle[w]);
      end
    end
    checks++;
    if (got[0] != '0 || got[1] == '0) begin
      failures++;
      $display("FAIL: zero/nonzero parity sanity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
