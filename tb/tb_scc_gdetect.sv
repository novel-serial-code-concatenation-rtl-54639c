// tb_scc_gdetect: self-checking testbench for the generalized concatenation,
// in which G parity bits of every C3 word travel inside its inner dataword so
// that the receiver finds corrupt datawords itself (no flag from the inner
// decoder is needed).
//
// Configuration: m = 36, BCH[1410,1311] (t = 9) with G = 9 detection bits, so
// 90 parity bits per block (10 RS symbols) are protected by RS[397,360] over
// GF(2^9). Its 37 parity symbols (333 bits) do not split evenly: the 36
// slices hold 9 or 10 bits, so D1^i is 1329 or 1330 bits long. Each corrupt
// dataword costs 10 + (1 or 2) erasures, so tau = 3. The expected erasure
// count is worked out from the slice boundaries i*333/36.
//
// Frames are built by scc_encoder from random data. The testbench flips bits
// in chosen datawords (data, detection bits and P2 slice alike) without
// raising in_corrupt, and checks that the receiver counts exactly those
// datawords as corrupt, restores all blocks and reports the corrected bits.
// A frame with a flagged but error-free dataword checks that the external
// flag still works alongside detection. An error pattern that leaves all G
// detection bits unchanged would go unseen; for random patterns of up to t
// errors this happens with probability about 2^-9 per dataword.
module tb_scc_gdetect;
  localparam int MF = 36, N3 = 1410, K3 = 1311, T3 = 9, N2 = 397, K2 = 360, M2 = 9, G = 9;
  localparam int R3 = N3 - K3, NPAR2 = N2 - K2, P2BITS = NPAR2 * M2,
                 SLICE = (P2BITS + MF - 1) / MF, K1 = K3 + G + SLICE;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // transmitter
  logic e_valid = 1'b0, e_bit = 1'b0;
  logic e_ready, e_ov, e_obit, e_ofirst, e_olast, e_oflast;
  scc_encoder #(.N2(N2), .K2(K2), .G(G)) enc (.clk, .rst_n, .in_valid(e_valid), .in_bit(e_bit), .in_ready(e_ready),
                   .out_valid(e_ov), .out_bit(e_obit), .out_first(e_ofirst), .out_last(e_olast),
                   .out_frame_last(e_oflast));

  // receiver under test
  logic d_valid = 1'b0, d_bit = 1'b0, d_corrupt = 1'b0;
  logic in_ready, out_valid, out_bit, out_first, out_last, frame_done;
  logic [5:0] n_corrupt;
  logic erasure_run, rs_fail, bch_fail;
  logic [$clog2(N2+1)-1:0] n_erased;
  logic [$clog2(MF*T3+1)-1:0] n_corrected;
  scc_decoder #(.N2(N2), .K2(K2), .G(G)) dut (.clk, .rst_n, .in_valid(d_valid), .in_bit(d_bit), .in_corrupt(d_corrupt),
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

  // slice w of P2 is bits [w*P2BITS/MF, (w+1)*P2BITS/MF)
  function automatic int slen(input int w);
    return ((w + 1) * P2BITS) / MF - (w * P2BITS) / MF;
  endfunction
  function automatic int len(input int w);
    return K3 + G + slen(w);
  endfunction
  // P2 symbols that share a bit with the slice of any corrupt dataword
  function automatic int p2_erased(input bit cor [MF]);
    int n;
    n = 0;
    for (int j = 0; j < NPAR2; j++) begin
      bit e;
      e = 1'b0;
      for (int w = 0; w < MF; w++)
        if (cor[w] && (w * P2BITS) / MF <= j * M2 + M2 - 1 && ((w + 1) * P2BITS) / MF - 1 >= j * M2)
          e = 1'b1;
      n += int'(e);
    end
    return n;
  endfunction

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
      d1[ew][len(ew)-1-ec] = e_obit;
      if (ec == len(ew) - 1) begin ec = 0; ew = (ew == MF - 1) ? 0 : ew + 1; end
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

  task automatic run_frame(input int ncor, input int nerr, input bit flag, input bit expect_ok,
                          input string name);
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
          p = (placed == 0 && nerr > 1) ? int'($urandom % slen(w)) : int'($urandom % len(w));
          if (!m[p]) begin
            m[p] = 1'b1;
            placed++;
            if (p >= slen(w)) total_d3_err++;
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
      for (int b = len(i) - 1; b >= 0; b--) begin
        while (!in_ready) @(posedge clk);
        d_valid   <= 1'b1;
        d_bit     <= d1[i][b];
        d_corrupt <= flag && cor[i];
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
      check(int'(n_erased) == ((ncor > 0) ? ncor * ((R3 - G) / M2) + p2_erased(cor) : 0),
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
    run_frame(0, 0, 1'b0, 1'b1, "clean frame");
    run_frame(1, T3, 1'b0, 1'b1, "one dataword detected");
    run_frame(3, T3, 1'b0, 1'b1, "tau datawords detected");
    run_frame(1, 0, 1'b1, 1'b1, "flagged by the inner decoder, no errors");
    run_frame(4, 3, 1'b0, 1'b0, "beyond erasure capacity");
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

