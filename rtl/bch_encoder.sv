// bch_encoder: systematic encoder for a shortened binary BCH code, used as the
// short outer code C3 of the serial concatenation (one C3 codeword per inner
// dataword).
//
// The K data bits of a word arrive one per cycle on in_bit, qualified by
// in_valid, most significant (highest-degree) bit first. They are divided by
// the generator polynomial g(x) in an R-bit linear feedback shift register,
// R = N - K. g(x) is the product of the minimal polynomials of alpha^1,
// alpha^3, ..., alpha^(2T-1) and is computed at elaboration from M, T and the
// primitive polynomial PRIM. The data bits themselves are not echoed: the
// caller keeps them and needs only the parity.
//
// Timing: one cycle after the K-th data bit, parity_valid pulses for one cycle
// and parity holds the R remainder bits (parity[R-1] is the coefficient of
// x^(R-1), the first parity bit in transmission order). The register is
// cleared at the same time, so the next word may start in the very next cycle
// (throughput one bit per cycle, no gaps needed).
//
// The code parameters (BCH[1410,1311,19] over GF(2^11), t = 9) are those of
// the reference LDPC + RS + BCH configuration. The bit-serial datapath, the
// primitive polynomial and the active-low asynchronous reset are this
// design's choices.
module bch_encoder
  import gf_pkg::*;
#(
  parameter int M    = 11,      // field GF(2^M)
  parameter int N    = 1410,    // shortened code length
  parameter int K    = 1311,    // code dimension
  parameter int T    = 9,       // correction capability
  parameter int PRIM = 'h805,   // primitive polynomial x^11 + x^2 + 1
  localparam int R   = N - K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         parity_valid,
  output logic [R-1:0] parity
);

  // Generator polynomial over GF(2): bit i is the coefficient of x^i.
  function automatic logic [R:0] gen_poly();
    logic [R:0] g;
    logic [R:0] gn;
    gf_t        mp [0:GF_MAXM];
    gf_t        root;
    int         n;
    int         c;
    int         mdeg;
    bit         dup;
    bit         done;
    n = (1 << M) - 1;
    g = '0;
    g[0] = 1'b1;
    for (int i = 1; i < 2 * T; i += 2) begin
      dup = 1'b0;
      for (int j = 1; j < i; j += 2)
        for (int k = 0; k < M; k++)
          if ((j * (1 << k)) % n == i) dup = 1'b1;
      if (!dup) begin
        // minimal polynomial of alpha^i: product over its cyclotomic coset
        for (int d = 0; d <= GF_MAXM; d++) mp[d] = '0;
        mp[0] = gf_t'(1);
        mdeg  = 0;
        c     = i;
        done  = 1'b0;
        for (int k = 0; k < M; k++) begin
          if (!done) begin
            root = gf_alpha(c, M, PRIM);
            for (int d = GF_MAXM; d >= 1; d--)
              mp[d] = mp[d-1] ^ gf_mul(mp[d], root, M, PRIM);
            mp[0] = gf_mul(mp[0], root, M, PRIM);
            mdeg  = mdeg + 1;
            c     = (c * 2) % n;
            if (c == i) done = 1'b1;
          end
        end
        gn = '0;
        for (int d = 0; d <= GF_MAXM; d++)
          if (d <= mdeg && mp[d][0]) gn = gn ^ (g << d);
        g = gn;
      end
    end
    return g;
  endfunction

  localparam logic [R:0] GEN = gen_poly();

  if (GEN[R] != 1'b1) begin : g_bad_degree
    $error("bch_encoder: generator degree differs from N-K");
  end

  logic [R-1:0]         lfsr, lfsr_next;
  logic [$clog2(K)-1:0] cnt;
  logic                 fb;

  always_comb begin
    fb        = in_bit ^ lfsr[R-1];
    lfsr_next = {lfsr[R-2:0], 1'b0} ^ (fb ? GEN[R-1:0] : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr         <= '0;
      cnt          <= '0;
      parity       <= '0;
      parity_valid <= 1'b0;
    end else begin
      parity_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == ($clog2(K))'(K - 1)) begin
          cnt          <= '0;
          lfsr         <= '0;
          parity       <= lfsr_next;
          parity_valid <= 1'b1;
        end else begin
          cnt  <= cnt + 1'b1;
          lfsr <= lfsr_next;
        end
      end
    end
  end

endmodule
