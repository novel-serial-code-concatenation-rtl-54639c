// tb_scc_top: end-to-end testbench of the serial code concatenation at its
// default sizes (m = 36, BCH[1410,1311,19], RS[432,396,37]).
//
// Random frames go into the transmitter. The testbench stands in for the inner
// code C1, the channel and the C1 decoder: it collects the m inner datawords,
// lets a few of them come out of the "inner decoder" with residual errors
// (random bit flips in data and carried parity, at most w_max = 9 per
// dataword) and raises the residual-error flag for those, then passes the
// frame to the receiver. Every decoded block is compared with what was sent.
//
// Each mechanism of the receiver is counted and must occur at least once:
// frames without corrupt datawords (erasure decoding bypassed), erasure
// decoding, BCH correction of a corrupt dataword, a frame with the maximum
// tau = 3 corrupt datawords, and a frame beyond the erasure capacity
// (rs_fail). Throughput is checked too: the transmitter must emit a frame as
// one burst of m*K1 bits, and the receiver must accept a frame in m*K1
// consecutive cycles.
//
// The tau = 1 variant (m = 10, BCH[1397,1320,15], single-parity-check C2) is
// run the same way with its own counters: a clean frame, recovery of one
// corrupt dataword, a corrupt last dataword (errors also in the carried SPC
// parity) and a frame with two corrupt datawords (frame_fail).
module tb_scc_top;
  localparam int MF = 36, N3 = 1410, K3 = 1311, T3 = 9, N2 = 432, K2 = 396, M2 = 9;
  localparam int R3 = N3 - K3, NPAR2 = N2 - K2, SLICE = NPAR2 * M2 / MF, K1 = K3 + SLICE;
  localparam int TAU = 3, WMAX = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tx_in_valid = 1'b0, tx_in_bit = 1'b0;
  logic tx_in_ready, tx_d1_valid, tx_d1_bit, tx_d1_first, tx_d1_last, tx_d1_frame_last;
  logic rx_d1_valid = 1'b0, rx_d1_bit = 1'b0, rx_d1_corrupt = 1'b0;
  logic rx_d1_ready, rx_out_valid, rx_out_bit, rx_out_first, rx_out_last, rx_frame_done;
  logic [5:0] rx_n_corrupt;
  logic rx_erasure_run, rx_rs_fail, rx_bch_fail;
  logic [$clog2(N2+1)-1:0] rx_n_erased;
  logic [$clog2(MF*T3+1)-1:0] rx_n_corrected;

  localparam int S_MF = 10, S_N3 = 1397, S_K3 = 1320, S_T3 = 7, S_R3 = S_N3 - S_K3;
  logic spc_tx_in_valid = 1'b0, spc_tx_in_bit = 1'b0;
  logic spc_tx_in_ready, spc_tx_d1_valid, spc_tx_d1_bit, spc_tx_d1_first, spc_tx_d1_last;
  logic spc_tx_d1_frame_last;
  logic spc_rx_d1_valid = 1'b0, spc_rx_d1_bit = 1'b0, spc_rx_d1_corrupt = 1'b0;
  logic spc_rx_d1_ready, spc_rx_out_valid, spc_rx_out_bit, spc_rx_out_first, spc_rx_out_last;
  logic spc_rx_frame_done, spc_rx_frame_fail;
  logic [3:0] spc_rx_n_corrupt;
  logic [3:0] spc_rx_n_corrected;

  scc_top dut (.*);

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

  // mechanism counters
  int n_bypass = 0, n_erasure = 0, n_bch_fix = 0, n_tau = 0, n_overflow = 0;
  int s_clean = 0, s_recover = 0, s_last = 0, s_fail = 0;

  // ---- tau = 1 variant: capture of both sides
  logic [S_K3-1:0] s_blk [S_MF];
  logic [S_K3-1:0] s_d1  [S_MF];
  logic [S_K3-1:0] s_got [S_MF];
  int  sec = 0, sew = 0, soc = 0, sow = 0;
  bit  s_tx_done = 0, s_rx_done = 0;

  function automatic int s_blen(input int w);
    return (w == S_MF - 1) ? S_K3 - S_R3 : S_K3;
  endfunction

  always @(posedge clk) begin
    if (rst_n && spc_tx_d1_valid) begin
      s_d1[sew][S_K3-1-sec] = spc_tx_d1_bit;
      if (sec == S_K3 - 1) begin sec = 0; sew = (sew == S_MF - 1) ? 0 : sew + 1; end
      else sec++;
      if (spc_tx_d1_frame_last) s_tx_done = 1'b1;
    end
    if (rst_n && spc_rx_out_valid && sow < S_MF) begin
      s_got[sow][s_blen(sow)-1-soc] = spc_rx_out_bit;
      if (soc == s_blen(sow) - 1) begin soc = 0; sow++; end
      else soc++;
    end
    if (rst_n && spc_rx_frame_done) s_rx_done = 1'b1;
  end

  function automatic bit s_same(input logic [S_K3-1:0] a, input logic [S_K3-1:0] b, input int len);
    for (int i = 0; i < len; i++)
      if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

  // one frame of the tau = 1 variant; cw0 >= 0 forces the first corrupt dataword
  task automatic run_spc_frame(input int ncor, input int nerr, input int cw0);
    bit cor [S_MF];
    int w, p;
    for (int i = 0; i < S_MF; i++) begin
      cor[i] = 1'b0;
      for (int b = 0; b < S_K3; b++) s_blk[i][b] = (b < s_blen(i)) ? 1'($urandom) : 1'b0;
    end
    s_tx_done = 1'b0;
    for (int i = 0; i < S_MF; i++)
      for (int b = s_blen(i) - 1; b >= 0; b--) begin
        spc_tx_in_valid <= 1'b1;
        spc_tx_in_bit   <= s_blk[i][b];
        @(posedge clk);
        while (!spc_tx_in_ready) @(posedge clk);
      end
    spc_tx_in_valid <= 1'b0;
    while (!s_tx_done) @(posedge clk);
    for (int c = 0; c < ncor; ) begin
      w = (c == 0 && cw0 >= 0) ? cw0 : int'($urandom % S_MF);
      if (!cor[w]) begin
        int placed;
        logic [S_K3-1:0] m;
        cor[w] = 1'b1;
        c++;
        m = '0;
        placed = 0;
        while (placed < nerr) begin
          p = (w == S_MF - 1 && placed == 0) ? int'($urandom % S_R3) : int'($urandom % S_K3);
          if (!m[p]) begin m[p] = 1'b1; placed++; end
        end
        s_d1[w] = s_d1[w] ^ m;
      end
    end
    s_rx_done = 1'b0;
    sow = 0;
    soc = 0;
    for (int i = 0; i < S_MF; i++)
      for (int b = S_K3 - 1; b >= 0; b--) begin
        while (!spc_rx_d1_ready) @(posedge clk);
        spc_rx_d1_valid   <= 1'b1;
        spc_rx_d1_bit     <= s_d1[i][b];
        spc_rx_d1_corrupt <= cor[i];
        @(posedge clk);
      end
    spc_rx_d1_valid <= 1'b0;
    while (!s_rx_done) @(posedge clk);
    @(posedge clk);
    check(int'(spc_rx_n_corrupt) == ncor, $sformatf("tau=1: n_corrupt %0d, expected %0d",
                                                    spc_rx_n_corrupt, ncor));
    check(sow == S_MF, $sformatf("tau=1: %0d blocks out", sow));
    if (ncor <= 1) begin
      check(!spc_rx_frame_fail, "tau=1: frame_fail raised");
      check(int'(spc_rx_n_corrected) == ((ncor == 1) ? nerr : 0),
            $sformatf("tau=1: %0d bits corrected, %0d injected", spc_rx_n_corrected, nerr));
      for (int i = 0; i < S_MF; i++)
        check(s_same(s_got[i], s_blk[i], s_blen(i)), $sformatf("tau=1: block %0d differs", i));
      if (ncor == 0) s_clean++;
      if (ncor == 1 && nerr > 0 && int'(spc_rx_n_corrected) == nerr) begin
        s_recover++;
        if (cor[S_MF-1]) s_last++;
      end
    end else begin
      check(spc_rx_frame_fail, "tau=1: two corrupt datawords not reported");
      s_fail += spc_rx_frame_fail;
    end
  endtask

  logic [K3-1:0] blk [MF];
  logic [K1-1:0] d1  [MF];
  logic [K3-1:0] got [MF];
  int  ec = 0, ew = 0, tx_first = 0, tx_burst = 0;
  bit  tx_done = 0;
  int  oc = 0, ow = 0;
  bit  rx_done = 0;

  always @(posedge clk) begin
    if (rst_n && tx_d1_valid) begin
      if (ec == 0 && ew == 0) tx_first = cyc;
      d1[ew][K1-1-ec] = tx_d1_bit;
      if (ec == K1 - 1) begin ec = 0; ew = (ew == MF - 1) ? 0 : ew + 1; end
      else ec++;
      if (tx_d1_frame_last) begin
        tx_burst = cyc - tx_first + 1;
        tx_done  = 1'b1;
      end
    end
    if (rst_n && rx_out_valid) begin
      got[ow][K3-1-oc] = rx_out_bit;
      if (oc == K3 - 1) begin oc = 0; ow++; end
      else oc++;
    end
    if (rst_n && rx_frame_done) rx_done = 1'b1;
  end

  task automatic run_frame(input int ncor, input int nerr_max);
    bit cor [MF];
    int w, p, nd3, t0, t1, stalls;
    stalls = 0;
    for (int i = 0; i < MF; i++) begin
      cor[i] = 1'b0;
      for (int b = 0; b < K3; b++) blk[i][b] = 1'($urandom);
    end
    tx_done = 1'b0;
    for (int i = 0; i < MF; i++)
      for (int b = K3 - 1; b >= 0; b--) begin
        tx_in_valid <= 1'b1;
        tx_in_bit   <= blk[i][b];
        @(posedge clk);
        while (!tx_in_ready) @(posedge clk);
      end
    tx_in_valid <= 1'b0;
    while (!tx_done) @(posedge clk);
    check(tx_burst == MF * K1, $sformatf("transmit burst %0d bits", tx_burst));
    // inner decoder with residual errors in ncor datawords
    nd3 = 0;
    for (int c = 0; c < ncor; ) begin
      w = int'($urandom % MF);
      if (!cor[w]) begin
        int k, placed;
        logic [K1-1:0] m;
        cor[w] = 1'b1;
        c++;
        k = 1 + int'($urandom % nerr_max);
        m = '0;
        placed = 0;
        while (placed < k) begin
          p = int'($urandom % K1);
          if (!m[p]) begin
            m[p] = 1'b1;
            placed++;
            if (p >= SLICE) nd3++;
          end
        end
        d1[w] = d1[w] ^ m;
      end
    end
    rx_done = 1'b0;
    ow = 0;
    oc = 0;
    while (!rx_d1_ready) @(posedge clk);
    t0 = cyc;
    for (int i = 0; i < MF; i++)
      for (int b = K1 - 1; b >= 0; b--) begin
        rx_d1_valid   <= 1'b1;
        rx_d1_bit     <= d1[i][b];
        rx_d1_corrupt <= cor[i];
        @(posedge clk);
        if (!(rx_d1_ready || (i == MF - 1 && b == 0))) stalls++;
      end
    t1 = cyc;
    rx_d1_valid <= 1'b0;
    check(stalls == 0, $sformatf("receiver dropped ready %0d times during load", stalls));
    check(t1 - t0 == MF * K1, $sformatf("receiver load took %0d cycles", t1 - t0));
    while (!rx_done) @(posedge clk);
    @(posedge clk);
    check(int'(rx_n_corrupt) == ncor, $sformatf("n_corrupt %0d, expected %0d", rx_n_corrupt, ncor));
    if (ncor == 0) n_bypass += !rx_erasure_run;
    if (ncor > 0)  n_erasure += rx_erasure_run;
    if (ncor == TAU) n_tau++;
    if (ncor <= TAU) begin
      check(!rx_rs_fail && !rx_bch_fail, $sformatf("%0d corrupt: failure flagged", ncor));
      check(int'(rx_n_corrected) == nd3, $sformatf("%0d bits corrected, %0d injected",
                                                   rx_n_corrected, nd3));
      if (nd3 > 0 && int'(rx_n_corrected) == nd3) n_bch_fix++;
      for (int i = 0; i < MF; i++)
        check(got[i] == blk[i], $sformatf("%0d corrupt: block %0d differs", ncor, i));
    end else begin
      check(rx_rs_fail, "overflow not reported");
      n_overflow += rx_rs_fail;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(0, 1);
    run_frame(1, WMAX);
    run_frame(TAU, WMAX);
    run_frame(2, WMAX);
    run_frame(TAU + 1, 4);
    run_frame(0, 1);
    run_spc_frame(0, 0, -1);
    run_spc_frame(1, S_T3, 3);
    run_spc_frame(1, S_T3, S_MF - 1);
    run_spc_frame(2, 2, -1);
    check(s_clean > 0,   "tau=1: no clean frame");
    check(s_recover > 0, "tau=1: no dataword recovered from the SPC parity");
    check(s_last > 0,    "tau=1: corrupt last dataword never recovered");
    check(s_fail > 0,    "tau=1: two corrupt datawords never reported");
    check(n_bypass > 0,   "no frame bypassed erasure decoding");
    check(n_erasure > 0,  "erasure decoding never ran");
    check(n_bch_fix > 0,  "BCH decoder never corrected a dataword");
    check(n_tau > 0,      "no frame with tau corrupt datawords");
    check(n_overflow > 0, "erasure capacity overflow never seen");
    $display("mechanisms: bypass=%0d erasure=%0d bch_fix=%0d tau_frames=%0d overflow=%0d",
             n_bypass, n_erasure, n_bch_fix, n_tau, n_overflow);
    $display("tau=1 mechanisms: clean=%0d recovered=%0d last_word=%0d two_corrupt=%0d",
             s_clean, s_recover, s_last, s_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
