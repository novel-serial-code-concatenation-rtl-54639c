// tb_spc_scc_encoder: self-checking testbench for the transmitter of the
// tau = 1 concatenation at its default sizes (m = 10, BCH[1397,1320], R3 = 77
// single-parity-check codes).
//
// Three random frames are encoded. The testbench checks that every inner
// dataword carries its uncoded bits unchanged, and that the R3 bits closing the
// last dataword equal the bitwise XOR of the BCH parities of all blocks. It
// computes those parities itself, by long division by a generator polynomial
// built from the cyclotomic cosets of alpha, alpha^3, ..., alpha^(2T-1); the
// last block is taken with R3 leading zeros. It also checks the dataword
// markers, that no output appears while the implicit zeros are fed, and the
// delay from the last uncoded bit to the end of the frame.
module tb_spc_scc_encoder;
  import gf_pkg::*;

  localparam int MF = 10, M3 = 11, N3 = 1397, K3 = 1320, T3 = 7, PRIM3 = 'h805;
  localparam int R3 = N3 - K3;
  localparam int FRAMES = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_bit = 1'b0;
  logic in_ready, out_valid, out_bit, out_first, out_last, out_frame_last;
  spc_scc_encoder dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  logic [R3:0] gref;
  initial begin
    int  n;
    bit  used [];
    gf_t g [R3+1];
    int  deg;
    n = (1 << M3) - 1;
    used = new[n];
    for (int i = 0; i <= R3; i++) g[i] = '0;
    g[0] = 1;
    deg = 0;
    for (int i = 1; i < 2 * T3; i += 2) begin
      int c;
      c = i;
      while (!used[c]) begin
        gf_t a;
        a = gf_alpha(c, M3, PRIM3);
        used[c] = 1'b1;
        deg++;
        for (int d = deg; d >= 1; d--) g[d] = g[d-1] ^ gf_mul(g[d], a, M3, PRIM3);
        g[0] = gf_mul(g[0], a, M3, PRIM3);
        c = (2 * c) % n;
      end
    end
    if (deg != R3) $display("FAIL: reference generator degree %0d", deg);
    for (int i = 0; i <= R3; i++) gref[i] = g[i][0];
  end

  function automatic logic [R3-1:0] bch_par(input logic [K3-1:0] d);
    logic [N3-1:0] rem;
    rem = {d, {R3{1'b0}}};
    for (int i = N3 - 1; i >= R3; i--)
      if (rem[i]) rem[i -: R3+1] = rem[i -: R3+1] ^ gref;
    return rem[R3-1:0];
  endfunction

  function automatic int blen(input int w);
    return (w == MF - 1) ? K3 - R3 : K3;
  endfunction

  logic [K3-1:0] blk [FRAMES][MF];
  logic [K3-1:0] d1  [FRAMES][MF];
  int oc = 0, of = 0, ow = 0;
  int cyc = 0;
  int nfirst = 0, nlast = 0, nflast = 0, marker_err = 0;
  int last_in [FRAMES];
  int flast_cyc [FRAMES];
  int in_f = 0, in_w = 0, in_b = 0;
  bit zero_run_out = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready && in_f < FRAMES) begin
      if (in_w == MF - 1 && in_b == blen(in_w) - 1) last_in[in_f] = cyc;
      if (in_b == blen(in_w) - 1) begin
        in_b = 0;
        if (in_w == MF - 1) begin in_w = 0; in_f++; end
        else in_w++;
      end else in_b++;
    end
    // while the implicit zeros are fed, nothing of the last dataword may appear
    if (rst_n && out_valid && !in_ready && ow == MF - 1 && oc == 0) zero_run_out = 1'b1;
    if (rst_n && out_valid && of < FRAMES) begin
      d1[of][ow][K3-1-oc] = out_bit;
      if (out_first) begin nfirst++; if (oc != 0) marker_err++; end
      if (out_last)  begin nlast++;  if (oc != K3 - 1) marker_err++; end
      if (out_frame_last) begin
        nflast++;
        flast_cyc[of] = cyc;
        if (!(oc == K3 - 1 && ow == MF - 1)) marker_err++;
      end
      if (oc == K3 - 1) begin
        oc = 0;
        if (ow == MF - 1) begin ow = 0; of++; end
        else ow++;
      end else oc++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int w = 0; w < MF; w++)
        for (int i = 0; i < K3; i++)
          blk[f][w][i] = (i < blen(w)) ? 1'($urandom) : 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int w = 0; w < MF; w++)
        for (int i = blen(w) - 1; i >= 0; i--) begin
          in_valid <= 1'b1;
          in_bit   <= blk[f][w][i];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
      // idle a little between frames on the second frame only
      if (f == 1) begin
        in_valid <= 1'b0;
        repeat (17) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    while (of < FRAMES) @(posedge clk);
    repeat (3) @(posedge clk);
    check(nfirst == FRAMES * MF && nlast == FRAMES * MF && nflast == FRAMES && marker_err == 0,
          $sformatf("markers first=%0d last=%0d frame_last=%0d misplaced=%0d",
                    nfirst, nlast, nflast, marker_err));
    check(!zero_run_out, "output seen in the last dataword while zeros were fed");
    for (int f = 0; f < FRAMES; f++) begin
      logic [R3-1:0] p2;
      p2 = '0;
      for (int w = 0; w < MF; w++) begin
        p2 = p2 ^ bch_par(blk[f][w]);
        if (w < MF - 1)
          check(d1[f][w] == blk[f][w], $sformatf("frame %0d word %0d data mismatch", f, w));
      end
      check(d1[f][MF-1][K3-1 -: K3-R3] == blk[f][MF-1][K3-R3-1:0],
            $sformatf("frame %0d last word data mismatch", f));
      check(d1[f][MF-1][R3-1:0] == p2, $sformatf("frame %0d P2 mismatch", f));
      check(flast_cyc[f] - last_in[f] == R3 + 2,
            $sformatf("frame %0d: P2 ends %0d cycles after the last data bit", f,
                      flast_cyc[f] - last_in[f]));
    end
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
