// tb_scc_encoder: self-checking testbench for the serial-concatenation
// transmitter at its default sizes (m = 36, BCH[1410,1311], RS[432,396]).
//
// Two random frames are encoded. For every inner dataword D1^i the testbench
// checks that the first K3 bits are the i-th input block, and collects the
// SLICE trailing bits into P2. Independently of the design it computes each
// BCH parity P3^i by long division by its own generator polynomial (built
// from the cyclotomic cosets of alpha, alpha^3, ...), forms the RS codeword
// D2 || P2 from them and requires all its syndromes to be zero. It also checks
// the out_first/out_last/out_frame_last markers and that each frame leaves as
// one unbroken burst of m*K1 bits.
module tb_scc_encoder;
  import gf_pkg::*;

  localparam int MF = 36, M3 = 11, N3 = 1410, K3 = 1311, T3 = 9, PRIM3 = 'h805;
  localparam int M2 = 9, N2 = 432, K2 = 396, PRIM2 = 'h211, FCR2 = 1;
  localparam int R3 = N3 - K3, NPAR2 = N2 - K2, P2BITS = NPAR2 * M2, SLICE = P2BITS / MF;
  localparam int K1 = K3 + SLICE;
  localparam int FRAMES = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_bit = 1'b0;
  logic in_ready, out_valid, out_bit, out_first, out_last, out_frame_last;
  scc_encoder dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---- reference BCH generator: product of (x + alpha^c) over the union of
  //      the cyclotomic cosets of 1, 3, ..., 2T-1 (coefficients end in GF(2))
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

  // ---- frame storage and output capture
  logic [K3-1:0]     blk [FRAMES][MF];
  logic [K1-1:0]     d1  [FRAMES][MF];
  int                oc = 0, of = 0, ow = 0;
  int                burst_first = -1, burst_last = -1;
  int                cyc = 0;
  int                nfirst = 0, nlast = 0, nflast = 0, marker_err = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && of < FRAMES) begin
      if (oc == 0 && ow == 0) burst_first = cyc;
      d1[of][ow][K1-1-oc] = out_bit;
      if (out_first) begin nfirst++; if (oc != 0) marker_err++; end
      if (out_last)  begin nlast++;  if (oc != K1 - 1) marker_err++; end
      if (out_frame_last) begin nflast++; if (!(oc == K1 - 1 && ow == MF - 1)) marker_err++; end
      if (oc == K1 - 1) begin
        oc = 0;
        if (ow == MF - 1) begin
          ow = 0;
          burst_last = cyc;
          check(burst_last - burst_first == MF * K1 - 1,
                $sformatf("frame %0d output burst spans %0d cycles", of, burst_last - burst_first + 1));
          of++;
        end else ow++;
      end else oc++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int w = 0; w < MF; w++)
        for (int i = 0; i < K3; i++) blk[f][w][i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int w = 0; w < MF; w++)
        for (int i = K3 - 1; i >= 0; i--) begin
          in_valid <= 1'b1;
          in_bit   <= blk[f][w][i];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
      in_valid <= 1'b0;
      while (of <= f) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    check(nfirst == FRAMES * MF && nlast == FRAMES * MF && nflast == FRAMES && marker_err == 0,
          $sformatf("markers first=%0d last=%0d frame_last=%0d misplaced=%0d",
                    nfirst, nlast, nflast, marker_err));
    for (int f = 0; f < FRAMES; f++) begin
      logic [P2BITS-1:0] p2;
      logic [MF*R3-1:0]  d2;
      for (int w = 0; w < MF; w++) begin
        check(d1[f][w][K1-1 -: K3] == blk[f][w], $sformatf("frame %0d word %0d data mismatch", f, w));
        p2[P2BITS-1 - w*SLICE -: SLICE] = d1[f][w][SLICE-1:0];
        d2[MF*R3-1 - w*R3 -: R3] = bch_par(blk[f][w]);
      end
      for (int j = FCR2; j < FCR2 + NPAR2; j++) begin
        gf_t s;
        gf_t a;
        s = '0;
        a = gf_alpha(j, M2, PRIM2);
        for (int q = K2 - 1; q >= 0; q--) s = gf_mul(s, a, M2, PRIM2) ^ gf_t'(d2[q*M2 +: M2]);
        for (int q = NPAR2 - 1; q >= 0; q--) s = gf_mul(s, a, M2, PRIM2) ^ gf_t'(p2[q*M2 +: M2]);
        check(s == '0, $sformatf("frame %0d RS syndrome %0d nonzero", f, j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
