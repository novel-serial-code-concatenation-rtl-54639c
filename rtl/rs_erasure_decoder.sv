// rs_erasure_decoder: erasure-only decoder for a shortened Reed-Solomon code
// over GF(2^M) (the C2 decoder of the serial concatenation). The positions of
// the unknown symbols are given with the word; up to NPAR = N - K erased
// symbols are recovered. No error search is made: the serial concatenation
// marks every symbol it cannot trust as an erasure and trusts the others.
//
// Structure:
//   S_IN    N symbols enter one per cycle with an erase flag (highest degree
//           first) and are stored in a symbol FIFO. Erased symbols count as
//           zero in the syndromes S_(FCR+j) = r(alpha^(FCR+j)), j = 0..NPAR-1.
//           At the same time the erasure locator G(x) = prod (1 + X x) is
//           built, multiplying in one factor per erasure, X = alpha^position.
//   S_OMEGA the evaluator W(x) = S(x) G(x) mod x^NPAR, one coefficient per
//           cycle.
//   S_LOAD  the Chien registers are loaded.
//   S_OUT   W and the odd part of G are evaluated at X^-1 for every position
//           (Chien search), and Forney's formula
//             Y = W(X^-1) / (X^FCR * sum_odd G_i X^-i)
//           gives the value of each erased symbol. The N symbols leave one per
//           cycle, erased ones replaced by Y.
//
// Interface: in_ready is high while a word may be shifted in. out_valid is
// high for N consecutive cycles; out_last marks the last symbol and dec_fail
// (more than NPAR erasures: symbols are passed unchanged) and n_erase are
// valid with it. A word takes 2N + NPAR + 1 cycles.
//
// RS[432,396,37] over GF(2^9) follows the reference configuration; the
// architecture, primitive polynomial and FCR = 1 are this design's choices.
module rs_erasure_decoder
  import gf_pkg::*;
#(
  parameter int M    = 9,
  parameter int N    = 432,
  parameter int K    = 396,
  parameter int PRIM = 'h211,
  parameter int FCR  = 1,
  localparam int NPAR = N - K,
  localparam int CW   = $clog2(N + 1),
  localparam int EW   = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [M-1:0]  in_sym,
  input  logic          in_erase,
  output logic          in_ready,
  output logic          out_valid,
  output logic [M-1:0]  out_sym,
  output logic          out_last,
  output logic          dec_fail,
  output logic [EW-1:0] n_erase
);

  typedef enum logic [1:0] {S_IN, S_OMEGA, S_LOAD, S_OUT} state_t;

  function automatic logic [NPAR-1:0][GF_MAXM-1:0] syn_consts();
    for (int j = 0; j < NPAR; j++) syn_consts[j] = gf_alpha(FCR + j, M, PRIM);
  endfunction
  function automatic logic [NPAR:0][GF_MAXM-1:0] chien_steps();
    for (int i = 0; i <= NPAR; i++) chien_steps[i] = gf_alpha(i, M, PRIM);
  endfunction
  function automatic logic [NPAR:0][GF_MAXM-1:0] chien_starts();
    for (int i = 0; i <= NPAR; i++) chien_starts[i] = gf_alpha(-i * (N - 1), M, PRIM);
  endfunction

  localparam logic [NPAR-1:0][GF_MAXM-1:0] SYN_MUL     = syn_consts();
  localparam logic [NPAR:0][GF_MAXM-1:0]   CHIEN_STEP  = chien_steps();
  localparam logic [NPAR:0][GF_MAXM-1:0]   CHIEN_START = chien_starts();
  localparam gf_t X_START   = gf_alpha(N - 1, M, PRIM);          // alpha^(N-1)
  localparam gf_t X_STEP    = gf_alpha(-1, M, PRIM);             // alpha^-1
  localparam gf_t XF_START  = gf_alpha(FCR * (N - 1), M, PRIM);  // alpha^(FCR(N-1))
  localparam gf_t XF_STEP   = gf_alpha(-FCR, M, PRIM);           // alpha^-FCR

  state_t                 state;
  logic [CW-1:0]          cnt;
  logic [N-1:0][M-1:0]    sbuf;
  logic [N-1:0]           ebuf;
  gf_t                    syn   [NPAR];
  gf_t                    gam   [NPAR+1];
  gf_t                    omega [NPAR];
  gf_t                    om_t  [NPAR];
  gf_t                    gm_t  [NPAR+1];
  gf_t                    xpos;
  gf_t                    xf;
  logic [EW-1:0]          nera;
  logic                   fail_r;

  // ---------------- combinational datapath ----------------
  gf_t omega_k;
  gf_t om_val;
  gf_t odd_sum;
  logic [M-1:0] yval;

  always_comb begin
    omega_k = '0;
    for (int i = 0; i <= NPAR; i++)
      if (i <= int'(cnt) && i < NPAR)
        omega_k = omega_k ^ gf_mul(gam[i], syn[(i <= int'(cnt) && i < NPAR) ? int'(cnt) - i : 0],
                                   M, PRIM);
    om_val = '0;
    for (int i = 0; i < NPAR; i++) om_val = om_val ^ om_t[i];
    odd_sum = '0;
    for (int i = 1; i <= NPAR; i += 2) odd_sum = odd_sum ^ gm_t[i];
    yval = M'(gf_mul(om_val, gf_inv(gf_mul(xf, odd_sum, M, PRIM), M, PRIM), M, PRIM));
  end

  assign in_ready  = (state == S_IN);
  assign out_valid = (state == S_OUT);
  assign out_sym   = (ebuf[N-1] && !fail_r) ? yval : sbuf[N-1];
  assign out_last  = (state == S_OUT) && (cnt == CW'(N - 1));
  assign dec_fail  = fail_r;
  assign n_erase   = nera;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IN;
      cnt    <= '0;
      sbuf   <= '0;
      ebuf   <= '0;
      xpos   <= X_START;
      xf     <= '0;
      nera   <= '0;
      fail_r <= 1'b0;
      for (int j = 0; j < NPAR; j++) begin
        syn[j]   <= '0;
        omega[j] <= '0;
        om_t[j]  <= '0;
      end
      for (int i = 0; i <= NPAR; i++) begin
        gam[i]  <= (i == 0) ? gf_t'(1) : '0;
        gm_t[i] <= '0;
      end
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          sbuf <= {sbuf[N-2:0], in_sym};
          ebuf <= {ebuf[N-2:0], in_erase};
          for (int j = 0; j < NPAR; j++)
            syn[j] <= gf_mul(syn[j], SYN_MUL[j], M, PRIM) ^ (in_erase ? '0 : gf_t'(in_sym));
          if (in_erase) begin
            nera <= nera + 1'b1;
            if (int'(nera) < NPAR) begin
              for (int i = 1; i <= NPAR; i++)
                gam[i] <= gam[i] ^ gf_mul(xpos, gam[i-1], M, PRIM);
            end
          end
          xpos <= gf_mul(xpos, X_STEP, M, PRIM);
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= S_OMEGA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OMEGA: begin
          omega[cnt[$clog2(NPAR)-1:0]] <= omega_k;
          if (cnt == CW'(NPAR - 1)) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_LOAD: begin
          for (int i = 0; i < NPAR; i++) om_t[i] <= gf_mul(omega[i], CHIEN_START[i], M, PRIM);
          for (int i = 0; i <= NPAR; i++) gm_t[i] <= gf_mul(gam[i], CHIEN_START[i], M, PRIM);
          xf     <= XF_START;
          fail_r <= int'(nera) > NPAR;
          state  <= S_OUT;
        end
        S_OUT: begin
          sbuf <= {sbuf[N-2:0], M'(0)};
          ebuf <= {ebuf[N-2:0], 1'b0};
          for (int i = 0; i < NPAR; i++) om_t[i] <= gf_mul(om_t[i], CHIEN_STEP[i], M, PRIM);
          for (int i = 0; i <= NPAR; i++) gm_t[i] <= gf_mul(gm_t[i], CHIEN_STEP[i], M, PRIM);
          xf <= gf_mul(xf, XF_STEP, M, PRIM);
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= S_IN;
            xpos  <= X_START;
            nera  <= '0;
            for (int j = 0; j < NPAR; j++) syn[j] <= '0;
            for (int i = 0; i <= NPAR; i++) gam[i] <= (i == 0) ? gf_t'(1) : '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end

endmodule
