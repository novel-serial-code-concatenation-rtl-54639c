// tb_scc_decoder: self-checking testbench for the serial-concatenation
// receiver at its default sizes (m = 36, BCH[1410,1311], RS[432,396]).
//
// Frames are built by the transmitter (scc_encoder) from random data. Standing
// in for the inner decoder, the testbench flips bits in chosen datawords D1^i
// (both in the data part and in the carried RS parity slice) and raises
// in_corrupt for them. Each frame exercises one situation:
//   no corrupt dataword (erasure decoding skipped), one corrupt dataword with
//   T3 errors, tau = 3 corrupt datawords (the erasure capacity), a flagged
//   dataword with no errors, and four corrupt datawords (beyond capacity:
//   rs_fail must be raised).
// The decoded blocks are compared with the original data, the status outputs
// with the injected situation, and the decoding time with its upper bound.
module tb_scc_decoder;
  localparam int MF = 36, N3 = 1410, K3 = 1311, T3 = 9, N2 = 432, K2 = 396, M2 = 9;
  localparam int R3 = N3 - K3, NPAR2 = N2 - K2, SLICE = NPAR2 * M2 / MF, K1 = K3 + SLICE;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // transmitter
  logic e_valid = 1'b0, e_bit = 1'b0;
  logic e_ready, e_ov, e_obit, e_ofirst, e_olast, e_oflast;
  scc_encoder enc (.clk, .rst_n, .in_valid(e_valid), .in_bit(e_bit), .in_ready(e_ready),
                   .out_valid(e_ov), .out_bit(e_obit), .out_first(e_ofirst), .out_last(e_olast),
                   .out_frame_last(e_oflast));

  // receiver under test
  logic d_valid = 1'b0, d_bit = 1'b0, d_corrupt = 1'b0;
  logic in_ready, out_valid, out_bit, out_first, out_last, frame_done;
  logic [5:0] n_corrupt;
  logic erasure_run, rs_fail, bch_fail;
  logic [$clog2(N2+1)-1:0] n_erased;
  logic [$clog2(MF*T3+1)-1:0] n_corrected;
  scc_decoder dut (.clk, .rst_n, .in_valid(d_valid), .in_bit(d_bit), .in_corrupt(d_corrupt),
                   .in_ready, .out_valid, .out_bit, .out_first, .out_last, .frame_done,
                   .n_corrupt, .erasure_run, .rs_fail, .bch_fail, .n_erased, .n_corrected);

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", msg);
    end
  endtask

  logic [K3-1:0] blk [MF];
  logic [K1-1:0] d1  [MF];
  logic [K3-1:0] got [MF];
  int ec = 0, ew = 0;
  int oc = 0, ow = 0;
  int done_cycle;
  bit frame_seen = 0;
  bit enc_done = 0;

  // capture transmitter output
  always @(posedge clk) begin
    if (rst_n && e_ov) begin
      d1[ew][K1-1-ec] = e_obit;
      if (ec == K1 - 1) begin ec = 0; ew = (ew == MF - 1) ? 0 : ew + 1; end
      else ec++;
      if (e_oflast) enc_done = 1'b1;
    end
  end

  // capture receiver output
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_first && oc != 0) check(0, "out_first misplaced");
      got[ow][K3-1-oc] = out_bit;
      if (oc == K3 - 1) begin
        if (!out_last) check(0, "out_last missing");
        oc = 0;
        ow++;
      end else oc++;
    end
    if (rst_n && frame_done) begin
      done_cycle = cyc;
      frame_seen = 1'b1;
    end
  end

  task automatic run_frame(input int ncor, input int nerr, input bit expect_ok, input string name);
    bit   cor [MF];
    int   w, p, total_d3_err, t_last, bound;
    for (int i = 0; i < MF; i++) begin
      cor[i] = 1'b0;
      for (int b = 0; b < K3; b++) blk[i][b] = 1'($urandom);
    end
    // encode
    enc_done = 1'b0;
    for (int i = 0; i < MF; i++)
      for (int b = K3 - 1; b >= 0; b--) begin
        e_valid <= 1'b1;
        e_bit   <= blk[i][b];
        @(posedge clk);
        while (!e_ready) @(posedge clk);
      end
    e_valid <= 1'b0;
    while (!enc_done) @(posedge clk);
    repeat (2) @(posedge clk);
    // channel + inner decoder model: corrupt ncor distinct datawords
    total_d3_err = 0;
    for (int c = 0; c < ncor; ) begin
      w = int'($urandom % MF);
      if (!cor[w]) begin
        int placed;
        logic [K1-1:0] m;
        cor[w] = 1'b1;
        c++;
        m = '0;
        placed = 0;
        // first error always in the parity slice when there is one to place
        while (placed < nerr) begin
          p = (placed == 0 && nerr > 1) ? int'($urandom % SLICE) : int'($urandom % K1);
          if (!m[p]) begin
            m[p] = 1'b1;
            placed++;
            if (p >= SLICE) total_d3_err++;
          end
        end
        d1[w] = d1[w] ^ m;
      end
    end
    // feed the receiver
    frame_seen = 1'b0;
    ow = 0;
    oc = 0;
    for (int i = 0; i < MF; i++)
      for (int b = K1 - 1; b >= 0; b--) begin
        while (!in_ready) @(posedge clk);
        d_valid   <= 1'b1;
        d_bit     <= d1[i][b];
        d_corrupt <= cor[i];
        @(posedge clk);
      end
    t_last = cyc;
    d_valid <= 1'b0;
    while (!frame_seen) @(posedge clk);
    @(posedge clk);
    check(int'(n_corrupt) == ncor, $sformatf("%s: n_corrupt %0d", name, n_corrupt));
    check(erasure_run == (ncor > 0), $sformatf("%s: erasure_run %0d", name, erasure_run));
    check(ow == MF, $sformatf("%s: %0d blocks out", name, ow));
    bound = MF * K3 + 8 + ((ncor > 0) ? 2 * N2 + NPAR2 + 8 : 0) + ncor * (R3 + 2 * N3 + 2 * T3 + 6);
    check(done_cycle - t_last <= bound,
          $sformatf("%s: decoding took %0d cycles, bound %0d", name, done_cycle - t_last, bound));
    if (expect_ok) begin
      check(!rs_fail && !bch_fail, $sformatf("%s: failure flagged", name));
      check(int'(n_erased) == ((ncor > 0) ? ncor * (R3 / M2 + 1) : 0),
            $sformatf("%s: %0d symbols erased", name, n_erased));
      check(int'(n_corrected) == total_d3_err,
            $sformatf("%s: %0d bits corrected, %0d injected", name, n_corrected, total_d3_err));
      for (int i = 0; i < MF; i++)
        check(got[i] == blk[i], $sformatf("%s: block %0d wrong (corrupt=%0d)", name, i, cor[i]));
    end else begin
      check(rs_fail, $sformatf("%s: rs_fail not raised", name));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(0, 0, 1'b1, "clean frame");
    run_frame(1, T3, 1'b1, "one corrupt dataword");
    run_frame(3, T3, 1'b1, "tau corrupt datawords");
    run_frame(2, 0, 1'b1, "flagged without errors");
    run_frame(4, 3, 1'b0, "beyond erasure capacity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

