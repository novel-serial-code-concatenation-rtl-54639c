// tb_rs_erasure_decoder: self-checking testbench for the erasure-only
// Reed-Solomon decoder. Codewords come from the RS encoder. A chosen number of
// distinct random positions (data or parity) are marked erased and their
// symbols replaced by random garbage; the decoder output must equal the
// original codeword. With NPAR+1 erasures dec_fail must be raised and the word
// passed unchanged. The first output symbol must follow the last input symbol
// by NPAR + 2 cycles.
module tb_rs_erasure_decoder;
  import gf_pkg::*;

  localparam int M = 9, N = 432, K = 396, PRIM = 'h211, FCR = 1;
  localparam int NPAR = N - K;
  localparam int EW = $clog2(N + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   e_valid = 1'b0;
  logic [M-1:0]           e_sym = '0;
  logic                   e_pv;
  logic [NPAR-1:0][M-1:0] e_par;
  rs_encoder #(.M(M), .N(N), .K(K), .PRIM(PRIM), .FCR(FCR)) enc (
    .clk, .rst_n, .in_valid(e_valid), .in_sym(e_sym), .parity_valid(e_pv), .parity(e_par));

  logic          d_valid = 1'b0, d_erase = 1'b0;
  logic [M-1:0]  d_sym = '0;
  logic          in_ready, out_valid, out_last, dec_fail;
  logic [M-1:0]  out_sym;
  logic [EW-1:0] n_erase;
  rs_erasure_decoder #(.M(M), .N(N), .K(K), .PRIM(PRIM), .FCR(FCR)) dut (
    .clk, .rst_n, .in_valid(d_valid), .in_sym(d_sym), .in_erase(d_erase), .in_ready,
    .out_valid, .out_sym, .out_last, .dec_fail, .n_erase);

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [N-1:0][M-1:0] got;
  int   ocnt = 0;
  int   first_out;
  logic got_fail;
  int   got_ne;
  bit   word_done = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocnt == 0) first_out <= cyc;
      got[N-1-ocnt] <= out_sym;
      ocnt <= ocnt + 1;
      if (out_last) begin
        got_fail  <= dec_fail;
        got_ne    <= int'(n_erase);
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

  task automatic run_word(input int ner);
    logic [K-1:0][M-1:0] data;
    logic [N-1:0][M-1:0] cw, rx;
    logic [N-1:0]        er;
    int p, last_in;
    for (int i = 0; i < K; i++) data[i] = M'($urandom);
    for (int i = K - 1; i >= 0; i--) begin
      e_valid <= 1'b1;
      e_sym   <= data[i];
      @(posedge clk);
    end
    e_valid <= 1'b0;
    @(posedge clk);
    while (!e_pv) @(posedge clk);
    cw = {data, e_par};
    rx = cw;
    er = '0;
    for (int c = 0; c < ner; ) begin
      p = int'($urandom % N);
      if (!er[p]) begin
        er[p] = 1'b1;
        rx[p] = M'($urandom);
        c++;
      end
    end
    while (!in_ready) @(posedge clk);
    for (int i = N - 1; i >= 0; i--) begin
      d_valid <= 1'b1;
      d_sym   <= rx[i];
      d_erase <= er[i];
      @(posedge clk);
    end
    last_in = cyc;
    d_valid <= 1'b0;
    d_erase <= 1'b0;
    word_done = 1'b0;
    while (!word_done) @(posedge clk);
    check(got_ne == ner, $sformatf("%0d erasures: counted %0d", ner, got_ne));
    if (ner <= NPAR) begin
      check(!got_fail, $sformatf("%0d erasures: failure reported", ner));
      check(got == cw, $sformatf("%0d erasures: output differs from codeword", ner));
    end else begin
      check(got_fail, $sformatf("%0d erasures: failure not reported", ner));
      check(got == rx, $sformatf("%0d erasures: word not passed unchanged", ner));
    end
    check(first_out - last_in == NPAR + 2,
          $sformatf("latency %0d, expected %0d", first_out - last_in, NPAR + 2));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_word(0);
    run_word(1);
    run_word(12);
    run_word(NPAR);
    run_word(NPAR);
    run_word(NPAR + 1);
    run_word(7);
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
