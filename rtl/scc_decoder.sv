// scc_decoder: receiver side of the serial code concatenation. It takes the
// MF inner datawords D1^i delivered by the inner (LDPC or turbo product)
// decoder, each with a flag telling whether the inner decoder left residual
// errors in it, and returns the MF data blocks D3^i with those errors removed.
//
// Generalized form (parameter G > 0, see scc_encoder): each D1^i also
// carries the top G bits of its C3 parity. A dataword is then corrupt if the
// inner decoder flags it or if those G received bits differ from the ones
// regenerated from D3^i. Only the other RD = R3 - G parity bits pass through
// C2; when a corrupt word is BCH-decoded its parity is made of the G
// received bits and the RD bits restored by C2.
//
// Decoding order:
//  1. Load: each D1^i = D3^i || slice i of P2 arrives bit-serially. D3^i is
//     stored in the frame buffer and re-encoded by a BCH (C3) encoder, which
//     regenerates P3^i; the P2 slice is kept. in_corrupt is sampled with the
//     last bit of each dataword. After the load one cycle merges the flags
//     with the result of the G-bit detection.
//  2. Erasure decoding (only if some dataword is corrupt): the RS word
//     D2 || P2 is built from the regenerated P3^i and the received P2. Every
//     symbol that comes from a corrupt dataword (its regenerated P3, and the
//     P2 symbols that overlap its slice) is marked as an erasure. The RS
//     erasure decoder restores the true P3^i of the corrupt datawords.
//     Otherwise this step is skipped.
//  3. Output: clean D3^i are read straight out of the buffer. For a corrupt
//     one, D3^i || restored P3^i goes through the BCH (C3) decoder, which
//     corrects up to T3 bit errors, and its K3 data bits are sent on.
//
// Interface: in_valid/in_bit/in_corrupt are accepted while in_ready is high.
// Output bits leave on out_valid/out_bit with out_first/out_last marking each
// D3^i block; the output cannot be stalled and may have gaps. frame_done
// pulses after the last block with the frame status: n_corrupt, erasure_run
// (step 2 ran), rs_fail (more erasures than the RS redundancy) and bch_fail
// (a BCH word failed to decode), n_erased (RS symbols erased) and n_corrected
// (bits flipped by the BCH decoder). A frame with c corrupt datawords takes
// MF*K1 + 1 load cycles, then 2*N2 + NPAR2 + 4 cycles for step 2 if c > 0, and
// about MF*K3 + c*(R3 + 2*N3 + 2*T3 + 2) cycles to output.
//
// The decoding steps and code sizes follow the reference configuration. The
// bit-serial datapath, the sampling point of in_corrupt, the status outputs
// and the behaviour on failure (data are passed on uncorrected) are this
// design's choices.
module scc_decoder #(
  parameter int MF    = 36,
  parameter int M3    = 11,
  parameter int N3    = 1410,
  parameter int K3    = 1311,
  parameter int T3    = 9,
  parameter int PRIM3 = 'h805,
  parameter int M2    = 9,
  parameter int N2    = 432,
  parameter int K2    = 396,
  parameter int PRIM2 = 'h211,
  parameter int FCR2  = 1,
  parameter int G     = 0,        // C3 parity bits sent for error detection
  localparam int R3     = N3 - K3,
  localparam int RD     = R3 - G,   // C3 parity bits protected by C2
  localparam int GW     = (G > 0) ? G : 1,
  localparam int SYM3   = RD / M2,
  localparam int NPAR2  = N2 - K2,
  localparam int P2BITS = NPAR2 * M2,
  localparam int SLICE  = (P2BITS + MF - 1) / MF,   // longest P2 slice
  localparam int K1     = K3 + G + SLICE,
  localparam int AW     = $clog2(MF * K3),
  localparam int WW     = $clog2(MF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // inner datawords from the C1 decoder
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic          in_corrupt,
  output logic          in_ready,
  // decoded data blocks
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_first,
  output logic          out_last,
  // frame status
  output logic          frame_done,
  output logic [WW-1:0] n_corrupt,
  output logic          erasure_run,
  output logic          rs_fail,
  output logic          bch_fail,
  output logic [$clog2(N2+1)-1:0]     n_erased,
  output logic [$clog2(MF*T3+1)-1:0]  n_corrected
);

  if (G < 0 || G >= R3 || RD % M2 != 0 || MF * SYM3 != K2) begin : g_bad_sizes
    $error("scc_decoder: code sizes do not tile the frame");
  end

  // D1^i length: slice i of P2 is bits [i*P2BITS/MF, (i+1)*P2BITS/MF), so
  // slices differ by at most one bit when P2BITS is not a multiple of MF.
  function automatic logic [MF-1:0][15:0] d1_lens();
    for (int w = 0; w < MF; w++)
      d1_lens[w] = 16'(K3 + G + ((w + 1) * P2BITS) / MF - (w * P2BITS) / MF);
  endfunction
  localparam logic [MF-1:0][15:0] D1LEN = d1_lens();

  typedef enum logic [3:0] {S_LOAD, S_DET, S_CHK, S_RSIN, S_RSOUT, S_OUT, S_FEED, S_DEC, S_DONE} state_t;
  state_t state;

  localparam int BW  = $clog2(K1);
  localparam int MW  = $clog2(MF);
  localparam int SW  = $clog2(N2 + 1);
  localparam int QW  = $clog2(SYM3 + 1);
  localparam int DW  = $clog2(N3 + 1);

  // ---------------- frame state ----------------
  logic [MF-1:0]            corrupt;
  logic [MF-1:0][R3-1:0]    p3;
  logic [P2BITS-1:0]        p2;
  logic [WW-1:0]            ncor;
  logic [MF-1:0][GW-1:0]    phat;    // received detection bits
  logic [MF-1:0]            det;     // detection bits disagree
  logic [MF-1:0]            cor_all;
  logic [WW-1:0]            ncor_all;

  // ---------------- load phase ----------------
  logic                     take;
  logic [AW-1:0]            waddr;
  logic [BW-1:0]            lb;
  logic [MW-1:0]            lw;
  logic [MW-1:0]            pw;      // next P3 slot to fill
  logic                     re_valid;
  logic                     p3_valid;
  logic [R3-1:0]            p3_new;

  assign in_ready = (state == S_LOAD);
  assign take     = in_valid && in_ready;
  assign re_valid = take && (int'(lb) < K3);

  always_comb begin
    ncor_all = '0;
    for (int w = 0; w < MF; w++) begin
      det[w]     = (G > 0) && (GW'(p3[w] >> RD) != phat[w]);
      cor_all[w] = corrupt[w] | det[w];
      ncor_all   = ncor_all + WW'(cor_all[w]);
    end
  end

  bch_encoder #(.M(M3), .N(N3), .K(K3), .T(T3), .PRIM(PRIM3)) u_c3_reenc (
    .clk, .rst_n, .in_valid(re_valid), .in_bit,
    .parity_valid(p3_valid), .parity(p3_new));

  // ---------------- erasure decoding ----------------
  logic [SW-1:0]            rs_s;     // symbol index fed
  logic [MW-1:0]            rs_w;     // word of the fed P3 symbol
  logic [QW-1:0]            rs_q;     // symbol within P3
  logic                     rs_in_valid;
  logic [M2-1:0]            rs_in_sym;
  logic                     rs_in_erase;
  logic                     rs_in_ready;
  logic                     rs_out_valid, rs_out_last, rs_dec_fail;
  logic [M2-1:0]            rs_out_sym;
  logic [$clog2(N2+1)-1:0]  rs_nera;
  logic [SW-1:0]            ro_s;
  logic [MW-1:0]            ro_w;
  logic [QW-1:0]            ro_q;

  // Erase flag of P2 symbol j: set if any dataword whose slice overlaps the
  // symbol's bits is corrupt.
  function automatic logic p2_erase(input int j, input logic [MF-1:0] cor);
    logic e;
    e = 1'b0;
    for (int w = 0; w < MF; w++)
      if (cor[w] && (w * P2BITS / MF < (j + 1) * M2) && ((w + 1) * P2BITS / MF > j * M2))
        e = 1'b1;
    return e;
  endfunction

  always_comb begin
    rs_in_valid = (state == S_RSIN);
    if (int'(rs_s) < K2) begin
      rs_in_sym   = p3[rs_w][RD - 1 - int'(rs_q) * M2 -: M2];
      rs_in_erase = corrupt[rs_w];
    end else begin
      rs_in_sym   = p2[P2BITS - 1 - (int'(rs_s) - K2) * M2 -: M2];
      rs_in_erase = p2_erase(int'(rs_s) - K2, corrupt);
    end
  end

  rs_erasure_decoder #(.M(M2), .N(N2), .K(K2), .PRIM(PRIM2), .FCR(FCR2)) u_c2_dec (
    .clk, .rst_n, .in_valid(rs_in_valid), .in_sym(rs_in_sym), .in_erase(rs_in_erase),
    .in_ready(rs_in_ready), .out_valid(rs_out_valid), .out_sym(rs_out_sym),
    .out_last(rs_out_last), .dec_fail(rs_dec_fail), .n_erase(rs_nera));

  // ---------------- output phase ----------------
  logic [AW-1:0]            raddr;
  logic                     rdata;
  logic [MW-1:0]            ow;
  logic [DW-1:0]            ob;      // bit index within the word being issued
  logic [R3-1:0]            p3_sh;
  logic                     s2_valid, s2_data, s2_pbit, s2_first, s2_last, s2_dec;
  logic                     s2_bit;
  logic                     dec_in_ready, dec_out_valid, dec_out_bit, dec_out_last, dec_fail;
  logic [$clog2(T3+2)-1:0]  dec_nerr;
  logic [DW-1:0]            dcnt;    // decoder output bits seen

  frame_buffer #(.WIDTH(1), .DEPTH(MF * K3)) u_buf (
    .clk, .we(re_valid), .waddr, .wdata(in_bit), .raddr, .rdata);

  assign s2_bit = s2_data ? rdata : s2_pbit;

  bch_decoder #(.M(M3), .N(N3), .K(K3), .T(T3), .PRIM(PRIM3)) u_c3_dec (
    .clk, .rst_n, .in_valid(s2_valid && s2_dec), .in_bit(s2_bit), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_bit(dec_out_bit), .out_last(dec_out_last),
    .dec_fail, .n_err(dec_nerr));

  always_comb begin
    if (state == S_DEC) begin
      out_valid = dec_out_valid && (int'(dcnt) < K3);
      out_bit   = dec_out_bit;
      out_first = out_valid && (dcnt == '0);
      out_last  = out_valid && (int'(dcnt) == K3 - 1);
    end else begin
      out_valid = s2_valid && !s2_dec;
      out_bit   = s2_bit;
      out_first = out_valid && s2_first;
      out_last  = out_valid && s2_last;
    end
  end

  assign n_corrupt = ncor;

  // The BCH decoder must be idle whenever a word is fed to it.
  a_dec_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                (s2_valid && s2_dec) |-> dec_in_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      corrupt     <= '0;
      p3          <= '0;
      p2          <= '0;
      phat        <= '0;
      ncor        <= '0;
      waddr       <= '0;
      lb          <= '0;
      lw          <= '0;
      pw          <= '0;
      rs_s        <= '0;
      rs_w        <= '0;
      rs_q        <= '0;
      ro_s        <= '0;
      ro_w        <= '0;
      ro_q        <= '0;
      raddr       <= '0;
      ow          <= '0;
      ob          <= '0;
      p3_sh       <= '0;
      s2_valid    <= 1'b0;
      s2_data     <= 1'b0;
      s2_pbit     <= 1'b0;
      s2_first    <= 1'b0;
      s2_last     <= 1'b0;
      s2_dec      <= 1'b0;
      dcnt        <= '0;
      frame_done  <= 1'b0;
      erasure_run <= 1'b0;
      rs_fail     <= 1'b0;
      bch_fail    <= 1'b0;
      n_erased    <= '0;
      n_corrected <= '0;
    end else begin
      frame_done <= 1'b0;
      s2_valid   <= 1'b0;

      // regenerated C3 parity of each block
      if (p3_valid) begin
        p3[pw] <= p3_new;
        pw     <= (int'(pw) == MF - 1) ? '0 : pw + 1'b1;
      end

      unique case (state)
        S_LOAD: if (take) begin
          if (int'(lb) < K3)          waddr <= waddr + 1'b1;
          else if (int'(lb) < K3 + G) phat[lw] <= GW'({phat[lw], in_bit});
          else                        p2 <= {p2[P2BITS-2:0], in_bit};
          if (int'(lb) == int'(D1LEN[lw]) - 1) begin
            lb          <= '0;
            corrupt[lw] <= in_corrupt;
            ncor        <= ncor + WW'(in_corrupt);
            if (int'(lw) == MF - 1) begin
              lw    <= '0;
              state <= S_DET;
            end else begin
              lw <= lw + 1'b1;
            end
          end else begin
            lb <= lb + 1'b1;
          end
        end
        // corrupt = flagged by the inner decoder or caught by the detection bits
        S_DET: if (!p3_valid && pw == '0) begin
          corrupt <= cor_all;
          ncor    <= ncor_all;
          state   <= S_CHK;
        end
        S_CHK: begin
          rs_s        <= '0;
          rs_w        <= '0;
          rs_q        <= '0;
          ro_s        <= '0;
          ro_w        <= '0;
          ro_q        <= '0;
          erasure_run <= (ncor != '0);
          state       <= (ncor != '0) ? S_RSIN : S_OUT;
          raddr       <= '0;
          ow          <= '0;
          ob          <= '0;
        end
        S_RSIN: if (rs_in_ready) begin
          if (int'(rs_s) == N2 - 1) begin
            rs_s  <= '0;
            state <= S_RSOUT;
          end else begin
            rs_s <= rs_s + 1'b1;
          end
          if (int'(rs_q) == SYM3 - 1) begin
            rs_q <= '0;
            rs_w <= rs_w + 1'b1;
          end else begin
            rs_q <= rs_q + 1'b1;
          end
        end
        S_RSOUT: if (rs_out_valid) begin
          if (int'(ro_s) < K2) begin
            p3[ro_w][RD - 1 - int'(ro_q) * M2 -: M2] <= rs_out_sym;
            if (int'(ro_q) == SYM3 - 1) begin
              ro_q <= '0;
              ro_w <= ro_w + 1'b1;
            end else begin
              ro_q <= ro_q + 1'b1;
            end
          end
          ro_s <= ro_s + 1'b1;
          if (rs_out_last) begin
            rs_fail  <= rs_dec_fail;
            n_erased <= rs_nera;
            state   <= S_OUT;
          end
        end
        // issue one block: clean blocks go straight out, corrupt ones are
        // fed (data then restored parity) to the BCH decoder
        S_OUT: begin
          s2_valid <= 1'b1;
          s2_data  <= 1'b1;
          s2_dec   <= corrupt[ow];
          s2_first <= (ob == '0);
          s2_last  <= (int'(ob) == K3 - 1);
          raddr    <= raddr + 1'b1;
          if (int'(ob) == K3 - 1) begin
            ob <= '0;
            if (corrupt[ow]) begin
              // detection bits as received, the rest as restored by C2
              p3_sh <= (G > 0) ? ((p3[ow] & ~({R3{1'b1}} << RD)) | (R3'(phat[ow]) << RD))
                               : p3[ow];
              state <= S_FEED;
            end else if (int'(ow) == MF - 1) begin
              state <= S_DONE;
            end else begin
              ow <= ow + 1'b1;
            end
          end else begin
            ob <= ob + 1'b1;
          end
        end
        S_FEED: begin
          s2_valid <= 1'b1;
          s2_data  <= 1'b0;
          s2_dec   <= 1'b1;
          s2_pbit  <= p3_sh[R3-1];
          p3_sh    <= p3_sh << 1;
          if (int'(ob) == R3 - 1) begin
            ob    <= '0;
            dcnt  <= '0;
            state <= S_DEC;
          end else begin
            ob <= ob + 1'b1;
          end
        end
        S_DEC: if (dec_out_valid) begin
          dcnt <= dcnt + 1'b1;
          if (dec_out_last) begin
            bch_fail    <= bch_fail | dec_fail;
            n_corrected <= n_corrected + ($clog2(MF*T3+1))'(dec_fail ? 0 : int'(dec_nerr));
            if (int'(ow) == MF - 1) begin
              state <= S_DONE;
            end else begin
              ow    <= ow + 1'b1;
              state <= S_OUT;
            end
          end
        end
        S_DONE: if (!s2_valid) begin
          frame_done <= 1'b1;
          state      <= S_LOAD;
          waddr      <= '0;
          pw         <= '0;
        end
        default: state <= S_LOAD;
      endcase

      // status of the previous frame is held until the next one starts
      if (state == S_LOAD && take && lb == '0 && lw == '0) begin
        ncor        <= WW'(0);
        erasure_run <= 1'b0;
        rs_fail     <= 1'b0;
        bch_fail    <= 1'b0;
        corrupt     <= '0;
        n_erased    <= '0;
        n_corrected <= '0;
      end
    end
  end

endmodule
