// bch_decoder: hard-decision decoder for a shortened binary BCH code (the C3
// decoder of the serial concatenation). It corrects up to T bit errors in a
// received N-bit word.
//
// Structure (the classic syndrome / key-equation / Chien-search chain):
//   S_IN    N received bits enter one per cycle (highest degree first). They
//           are stored in an N-bit shift register (the decoder FIFO) while the
//           2T syndromes S_j = r(alpha^j), j = 1..2T, are accumulated by
//           Horner's rule.
//   S_BM    2T iterations (one per cycle) of the inversionless
//           Berlekamp-Massey algorithm give the error locator lambda(x).
//   S_CHIEN lambda is evaluated at alpha^-(N-1), ..., alpha^0, one position
//           per cycle, in step with the stored bits; a zero marks an error.
//   S_OUT   the N stored bits leave one per cycle, corrected when the number
//           of roots found equals the degree of lambda; otherwise they leave
//           unchanged and dec_fail is raised.
//
// Interface: in_ready is high while a new word may be shifted in. out_valid is
// high for N consecutive cycles; out_last marks the last bit, and dec_fail and
// n_err (roots found) are valid with it. A word takes 3N + 2T + 2 cycles.
//
// The code parameters follow the reference configuration, BCH[1410,1311,19]
// over GF(2^11). The serial architecture, the failure policy and the primitive
// polynomial are this design's choices.
module bch_decoder
  import gf_pkg::*;
#(
  parameter int M    = 11,
  parameter int N    = 1410,
  parameter int K    = 1311,
  parameter int T    = 9,
  parameter int PRIM = 'h805,
  localparam int CW  = $clog2(N + 1),
  localparam int EW  = $clog2(T + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          in_ready,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic          dec_fail,
  output logic [EW-1:0] n_err
);

  typedef enum logic [1:0] {S_IN, S_BM, S_CHIEN, S_OUT} state_t;

  // A primitive binary BCH code has M parity bits per corrected error.
  if (N - K != M * T) begin : g_bad_code
    $error("bch_decoder: N-K must equal M*T");
  end

  // Constants: syndrome multipliers alpha^j (j = 1..2T), Chien step values
  // alpha^i and Chien start values alpha^(-i(N-1)) (i = 0..T).
  function automatic logic [2*T-1:0][GF_MAXM-1:0] syn_consts();
    for (int j = 0; j < 2 * T; j++) syn_consts[j] = gf_alpha(j + 1, M, PRIM);
  endfunction
  function automatic logic [T:0][GF_MAXM-1:0] chien_steps();
    for (int i = 0; i <= T; i++) chien_steps[i] = gf_alpha(i, M, PRIM);
  endfunction
  function automatic logic [T:0][GF_MAXM-1:0] chien_starts();
    for (int i = 0; i <= T; i++) chien_starts[i] = gf_alpha(-i * (N - 1), M, PRIM);
  endfunction

  localparam logic [2*T-1:0][GF_MAXM-1:0] SYN_MUL     = syn_consts();
  localparam logic [T:0][GF_MAXM-1:0]     CHIEN_STEP  = chien_steps();
  localparam logic [T:0][GF_MAXM-1:0]     CHIEN_START = chien_starts();

  state_t         state;
  logic [CW-1:0]  cnt;
  logic [N-1:0]   word;
  logic [N-1:0]   err;
  gf_t            syn   [2*T];
  gf_t            lam   [T+1];
  gf_t            bpol  [T+1];
  gf_t            gam;
  int             kreg;
  gf_t            chien [T+1];
  logic [EW-1:0]  roots;
  logic [EW-1:0]  ldeg;
  logic           fail_r;

  // ---------------- combinational helpers ----------------
  gf_t  delta;
  gf_t  csum;
  gf_t  lam_new [T+1];

  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++)
      if (int'(cnt) >= i) delta = delta ^ gf_mul(lam[i], syn[int'(cnt) - i], M, PRIM);
    for (int i = 0; i <= T; i++)
      lam_new[i] = gf_mul(gam, lam[i], M, PRIM) ^
                   ((i > 0) ? gf_mul(delta, bpol[(i > 0) ? i - 1 : 0], M, PRIM) : '0);
    csum = '0;
    for (int i = 0; i <= T; i++) csum = csum ^ chien[i];
  end

  // degree of the final locator
  always_comb begin
    ldeg = '0;
    for (int i = 1; i <= T; i++)
      if (lam[i] != '0) ldeg = EW'(i);
  end

  assign in_ready  = (state == S_IN);
  assign out_valid = (state == S_OUT);
  assign out_bit   = word[N-1] ^ (err[N-1] & ~fail_r);
  assign out_last  = (state == S_OUT) && (cnt == CW'(N - 1));
  assign dec_fail  = fail_r;
  assign n_err     = roots;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IN;
      cnt    <= '0;
      word   <= '0;
      err    <= '0;
      gam    <= '0;
      kreg   <= 0;
      roots  <= '0;
      fail_r <= 1'b0;
      for (int j = 0; j < 2 * T; j++) syn[j] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam[i]   <= '0;
        bpol[i]  <= '0;
        chien[i] <= '0;
      end
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          word <= {word[N-2:0], in_bit};
          for (int j = 0; j < 2 * T; j++)
            syn[j] <= gf_mul(syn[j], SYN_MUL[j], M, PRIM) ^ gf_t'(in_bit);
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= S_BM;
            for (int i = 0; i <= T; i++) begin
              lam[i]  <= (i == 0) ? gf_t'(1) : '0;
              bpol[i] <= (i == 0) ? gf_t'(1) : '0;
            end
            gam  <= gf_t'(1);
            kreg <= 0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_BM: begin
          for (int i = 0; i <= T; i++) lam[i] <= lam_new[i];
          if (delta != '0 && kreg >= 0) begin
            for (int i = 0; i <= T; i++) bpol[i] <= lam[i];
            gam  <= delta;
            kreg <= -kreg - 1;
          end else begin
            for (int i = 0; i <= T; i++) bpol[i] <= (i > 0) ? bpol[(i > 0) ? i - 1 : 0] : '0;
            kreg <= kreg + 1;
          end
          if (cnt == CW'(2 * T - 1)) begin
            cnt   <= '0;
            state <= S_CHIEN;
            roots <= '0;
            for (int i = 0; i <= T; i++)
              chien[i] <= gf_mul(lam_new[i], CHIEN_START[i], M, PRIM);
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CHIEN: begin
          err <= {err[N-2:0], (csum == '0)};
          if (csum == '0) roots <= roots + 1'b1;
          for (int i = 0; i <= T; i++)
            chien[i] <= gf_mul(chien[i], CHIEN_STEP[i], M, PRIM);
          if (cnt == CW'(N - 1)) begin
            cnt    <= '0;
            state  <= S_OUT;
            fail_r <= ((csum == '0) ? roots + 1'b1 : roots) != ldeg;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: begin
          word <= {word[N-2:0], 1'b0};
          err  <= {err[N-2:0], 1'b0};
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= S_IN;
            for (int j = 0; j < 2 * T; j++) syn[j] <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end

endmodule
