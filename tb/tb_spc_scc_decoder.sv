// tb_spc_scc_decoder: self-checking testbench for the receiver of the tau = 1
// concatenation (BCH[1397,1320] inner-block code, R3 = 77 single-parity-check
// codes over m = 10 datawords) at its default sizes.
//
// Frames are built by spc_scc_encoder from random data. Standing in for the
// inner decoder, the testbench flips bits in chosen datawords and raises
// in_corrupt for them. The frames cover: no corrupt dataword; one corrupt
// dataword with T3 errors; the last dataword corrupt, with errors in both its
// data bits and the carried P2 bits; a flagged dataword without errors; and
// two corrupt datawords (beyond the tau = 1 capacity: frame_fail must rise
// and the frame is passed on as received). Decoded blocks are compared with
// the original data, the status outputs with the injected situation, and the
// decoding time with its bound.
module tb_spc_scc_decoder;
  localparam int MF = 10, N3 = 1397, K3 = 1320, T3 = 7;
  localparam int R3 = N3 - K3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic e_valid = 1'b0, e_bit = 1'b0;
  logic e_ready, e_ov, e_obit, e_ofirst, e_olast, e_oflast;
  spc_scc_encoder enc (.clk, .rst_n, .in_valid(e_valid), .in_bit(e_bit), .in_ready(e_ready),
                       .out_valid(e_ov), .out_bit(e_obit), .out_first(e_ofirst),
                       .out_last(e_olast), .out_frame_last(e_oflast));

  logic d_valid = 1'b0, d_bit = 1'b0, d_corrupt = 1'b0;
  logic in_ready, out_valid, out_bit, out_first, out_last, frame_done, frame_fail;
  logic [$clog2(MF+1)-1:0] n_corrupt;
  logic [$clog2(T3+2)-1:0] n_corrected;
  spc_scc_decoder dut (.clk, .rst_n, .in_valid(d_valid), .in_bit(d_bit), .in_corrupt(d_corrupt),
                       .in_ready, .out_valid, .out_bit, .out_first, .out_last, .frame_done,
                       .n_corrupt, .frame_fail, .n_corrected);

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

  // blk[MF-1] holds R3 leading zeros above its K3-R3 data bits
  logic [K3-1:0] blk [MF];
  logic [K3-1:0] d1  [MF];
  logic [K3-1:0] got [MF];
  int ec = 0, ew = 0;
  int oc = 0, ow = 0;
  int done_cycle;
  bit frame_seen = 0;
  bit enc_done = 0;

  function automatic int blen(input int w);
    return (w == MF - 1) ? K3 - R3 : K3;
  endfunction

  // compare the low len bits of a with bits [sh+len-1:sh] of b
  function automatic bit same(input logic [K3-1:0] a, input logic [K3-1:0] b, input int len,
                              input int sh);
    for (int i = 0; i < len; i++)
      if (a[i] != b[i+sh]) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    if (rst_n && e_ov) begin
      d1[ew][K3-1-ec] = e_obit;
      if (ec == K3 - 1) begin ec = 0; ew = (ew == MF - 1) ? 0 : ew + 1; end
      else ec++;
      if (e_oflast) enc_done = 1'b1;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && ow < MF) begin
      if (out_first && oc != 0) check(0, "out_first misplaced");
      got[ow][blen(ow)-1-oc] = out_bit;
      if (oc == blen(ow) - 1) begin
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

  task automatic run_frame(input int ncor, input int nerr, input int force_w, input string name);
    bit cor [MF];
    int w, p, t_last, bound;
    logic [K3-1:0] rx [MF];
    for (int i = 0; i < MF; i++) begin
      cor[i] = 1'b0;
      for (int b = 0; b < K3; b++) blk[i][b] = 1'($urandom);
    end
    blk[MF-1][K3-1 -: R3] = '0;
    enc_done = 1'b0;
    for (int i = 0; i < MF; i++)
      for (int b = blen(i) - 1; b >= 0; b--) begin
        e_valid <= 1'b1;
        e_bit   <= blk[i][b];
        @(posedge clk);
        while (!e_ready) @(posedge clk);
      end
    e_valid <= 1'b0;
    while (!enc_done) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int c = 0; c < ncor; ) begin
      w = (force_w >= 0 && c == 0) ? force_w : int'($urandom % MF);
      if (!cor[w]) begin
        int placed;
        logic [K3-1:0] m;
        cor[w] = 1'b1;
        c++;
        m = '0;
        placed = 0;
        while (placed < nerr) begin
          // in the last dataword put the first error among the P2 bits
          p = (w == MF - 1 && placed == 0) ? int'($urandom % R3) : int'($urandom % K3);
          if (!m[p]) begin
            m[p] = 1'b1;
            placed++;
          end
        end
        d1[w] = d1[w] ^ m;
      end
    end
    for (int i = 0; i < MF; i++) rx[i] = d1[i];
    frame_seen = 1'b0;
    ow = 0;
    oc = 0;
    for (int i = 0; i < MF; i++)
      for (int b = K3 - 1; b >= 0; b--) begin
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
    check(ow == MF, $sformatf("%s: %0d blocks out", name, ow));
    bound = MF * K3 + 3 * N3 + 2 * T3 + 20;
    check(done_cycle - t_last <= bound,
          $sformatf("%s: decoding took %0d cycles, bound %0d", name, done_cycle - t_last, bound));
    if (ncor <= 1) begin
      check(!frame_fail, $sformatf("%s: frame_fail raised", name));
      check(int'(n_corrected) == ((ncor == 1) ? nerr : 0),
            $sformatf("%s: %0d bits corrected, %0d injected", name, n_corrected, nerr));
      for (int i = 0; i < MF; i++)
        check(same(got[i], blk[i], blen(i), 0),
              $sformatf("%s: block %0d wrong (corrupt=%0d)", name, i, cor[i]));
    end else begin
      check(frame_fail, $sformatf("%s: frame_fail not raised", name));
      for (int i = 0; i < MF; i++)
        check(same(got[i], rx[i], blen(i), K3 - blen(i)),
              $sformatf("%s: block %0d not passed through", name, i));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(0, 0, -1, "clean frame");
    run_frame(1, T3, 2, "one corrupt dataword");
    run_frame(1, T3, MF - 1, "last dataword corrupt");
    run_frame(1, 0, 0, "flagged without errors");
    run_frame(2, 3, -1, "two corrupt datawords");
    run_frame(1, T3 - 2, MF - 2, "dataword before the last corrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
