// rs_encoder: systematic encoder for a shortened Reed-Solomon code over
// GF(2^M), used as the outer code C2 of the serial concatenation. Its data are
// the C3 parity blocks of all m inner datawords of a frame.
//
// K data symbols arrive one per cycle (in_valid, in_sym; highest degree
// first). They are divided by g(x) = (x + alpha^FCR)(x + alpha^(FCR+1)) ...
// (x + alpha^(FCR+NPAR-1)), NPAR = N - K, in an NPAR-stage symbol-wide LFSR
// with constant multipliers; g(x) is computed at elaboration.
//
// Timing: one cycle after the K-th data symbol parity_valid pulses and parity
// holds the NPAR parity symbols, parity[NPAR-1] being the first one in
// transmission order. The LFSR clears itself, so words may follow back to
// back at one symbol per cycle.
//
// RS[432,396,37] over GF(2^9) follows the reference LDPC + RS + BCH
// configuration; the primitive polynomial, the first consecutive root
// (FCR = 1) and the symbol-serial datapath are this design's choices.
module rs_encoder
  import gf_pkg::*;
#(
  parameter int M    = 9,
  parameter int N    = 432,
  parameter int K    = 396,
  parameter int PRIM = 'h211,   // x^9 + x^4 + 1
  parameter int FCR  = 1,
  localparam int NPAR = N - K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [M-1:0]            in_sym,
  output logic                    parity_valid,
  output logic [NPAR-1:0][M-1:0]  parity
);

  // Coefficients g_0 .. g_(NPAR-1) of the monic generator polynomial.
  function automatic logic [NPAR-1:0][M-1:0] gen_poly();
    gf_t g [NPAR+1];
    gf_t root;
    logic [NPAR-1:0][M-1:0] r;
    for (int i = 0; i <= NPAR; i++) g[i] = '0;
    g[0] = gf_t'(1);
    for (int j = 0; j < NPAR; j++) begin
      root = gf_alpha(FCR + j, M, PRIM);
      for (int i = NPAR; i >= 1; i--) g[i] = g[i-1] ^ gf_mul(g[i], root, M, PRIM);
      g[0] = gf_mul(g[0], root, M, PRIM);
    end
    for (int i = 0; i < NPAR; i++) r[i] = g[i][M-1:0];
    return r;
  endfunction

  localparam logic [NPAR-1:0][M-1:0] GEN = gen_poly();

  logic [NPAR-1:0][M-1:0] lfsr, lfsr_next;
  logic [$clog2(K)-1:0]   cnt;
  logic [M-1:0]           fb;

  always_comb begin
    fb = in_sym ^ lfsr[NPAR-1];
    for (int i = 0; i < NPAR; i++)
      lfsr_next[i] = ((i > 0) ? lfsr[(i > 0) ? i - 1 : 0] : '0) ^
                     M'(gf_mul(gf_t'(fb), gf_t'(GEN[i]), M, PRIM));
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
