// tb_bch_decoder: self-checking testbench for the shortened BCH decoder.
//
// Codewords are made by the BCH encoder from random data. The testbench flips
// a chosen number of distinct random bit positions (0 up to T, and T+1 to
// provoke a decoding failure), feeds the word to the decoder and compares the
// N output bits with the original codeword. It checks dec_fail and the error
// count, and that the first output bit follows the last input bit by exactly
// N + 2T + 1 cycles (Chien pass plus key-equation iterations).
module tb_bch_decoder;
  import gf_pkg::*;

  localparam int M = 11, N = 1410, K = 1311, T = 9, PRIM = 'h805;
  localparam int R = N - K;
  localparam int EW = $clog2(T + 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // encoder used to build codewords
  logic         e_valid = 1'b0, e_bit = 1'b0, e_pv;
  logic [R-1:0] e_par;
  bch_encoder #(.M(M), .N(N), .K(K), .T(T), .PRIM(PRIM)) enc (
    .clk, .rst_n, .in_valid(e_valid), .in_bit(e_bit), .parity_valid(e_pv), .parity(e_par));

  logic          d_valid = 1'b0, d_bit = 1'b0;
  logic          in_ready, out_valid, out_bit, out_last, dec_fail;
  logic [EW-1:0] n_err;
  bch_decoder #(.M(M), .N(N), .K(K), .T(T), .PRIM(PRIM)) dut (
    .clk, .rst_n, .in_valid(d_valid), .in_bit(d_bit), .in_ready, .out_valid, .out_bit,
    .out_last, .dec_fail, .n_err);

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // output collector
  logic [N-1:0] got;
  int           ocnt = 0;
  int           first_out = -1;
  logic         got_fail;
  int           got_nerr;
  bit           word_done = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocnt == 0) first_out <= cyc;
      got[N-1-ocnt] <= out_bit;
      ocnt <= ocnt + 1;
      if (out_last) begin
        got_fail  <= dec_fail;
        got_nerr  <= int'(n_err);
        word_done <= 1'b1;
        ocnt      <= 0;
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_word(input int nerr);
    logic [K-1:0] data;
    logic [N-1:0] cw, rx;
    int           pos [$];
    int           p, last_in;
    for (int i = 0; i < K; i++) data[i] = 1'($urandom);
    for (int i = K - 1; i >= 0; i--) begin
      e_valid <= 1'b1;
      e_bit   <= data[i];
      @(posedge clk);
    end
    e_valid <= 1'b0;
    @(posedge clk);
    while (!e_pv) @(posedge clk);
    cw = {data, e_par};
    rx = cw;
    pos.delete();
    while (pos.size() < nerr) begin
      p = int'($urandom % N);
      if (!(p inside {pos})) pos.push_back(p);
    end
    foreach (pos[i]) rx[pos[i]] = ~rx[pos[i]];
    while (!in_ready) @(posedge clk);
    for (int i = N - 1; i >= 0; i--) begin
      d_valid <= 1'b1;
      d_bit   <= rx[i];
      @(posedge clk);
    end
    last_in = cyc;
    d_valid <= 1'b0;
    word_done = 1'b0;
    while (!word_done) @(posedge clk);
    if (nerr <= T) begin
      check(!got_fail, $sformatf("%0d errors: decoder reported failure", nerr));
      check(got == cw, $sformatf("%0d errors: output differs from codeword", nerr));
      check(got_nerr == nerr, $sformatf("%0d errors: reported %0d", nerr, got_nerr));
    end else begin
      check(got_fail, $sformatf("%0d errors: failure not reported", nerr));
      check(got == rx, $sformatf("%0d errors: failed word not passed unchanged", nerr));
    end
    check(first_out - last_in == N + 2 * T + 1,
          $sformatf("latency %0d, expected %0d", first_out - last_in, N + 2 * T + 1));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_word(0);
    run_word(1);
    run_word(2);
    run_word(5);
    run_word(T);
    run_word(T);
    run_word(T + 1);
    run_word(T + 3);
    run_word(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
