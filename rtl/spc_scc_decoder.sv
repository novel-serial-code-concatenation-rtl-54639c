// spc_scc_decoder: receiver of the serial concatenation optimised for
// tau = 1, with R3 single-parity-check codes as the outer code C2 (see
// spc_scc_encoder for the frame format).
//
// Decoding:
//  1. Load: the MF inner datawords arrive bit-serially with the inner
//     decoder's residual-error flag (in_corrupt, sampled with the last bit of
//     each dataword). They are stored in the frame buffer, and the BCH (C3)
//     encoder regenerates every P3^i (R3 zeros are fed ahead of the last,
//     shortened block). The received P2 is kept.
//  2. If exactly one dataword c is corrupt, its parity follows from the SPC
//     relation: P3^c = P2 xor (xor of the P3^i of all other datawords). Errors
//     in the received P2 (carried by the last dataword) simply become errors
//     in the parity part of that C3 word, so nothing is erased.
//  3. Output: clean blocks come straight from the buffer; the corrupt one is
//     decoded by the BCH (C3) decoder (with the R3 leading zeros if it is the
//     last block) and only its data bits are sent on. The last block carries
//     K3-R3 data bits, the others K3.
// With more than one corrupt dataword the frame is passed on uncorrected and
// frame_fail is raised.
//
// Interface: in_valid/in_bit/in_corrupt are taken while in_ready is high;
// outputs out_valid/out_bit with out_first/out_last per data block (no
// stall). frame_done pulses at the end of a frame with n_corrupt, frame_fail
// and n_corrected valid. Loading takes MF*K3 cycles plus R3 cycles in which
// in_ready is low (zeros fed to the re-encoder before the last block).
//
// The decoding rule follows the reference tau = 1 scheme (Example 3); the
// serial datapath, flag timing and failure behaviour are this design's.
module spc_scc_decoder #(
  parameter int MF    = 10,
  parameter int M3    = 11,
  parameter int N3    = 1397,
  parameter int K3    = 1320,
  parameter int T3    = 7,
  parameter int PRIM3 = 'h805,
  localparam int R3   = N3 - K3,
  localparam int AW   = $clog2(MF * K3),
  localparam int WW   = $clog2(MF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic          in_corrupt,
  output logic          in_ready,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_first,
  output logic          out_last,
  output logic          frame_done,
  output logic [WW-1:0] n_corrupt,
  output logic          frame_fail,
  output logic [$clog2(T3+2)-1:0] n_corrected
);

  typedef enum logic [2:0] {S_LOAD, S_ZERO, S_FIX, S_OUT, S_FEEDZ, S_FEED, S_DEC, S_DONE} state_t;
  state_t state;

  localparam int BW = $clog2(N3 + 1);
  localparam int MW = $clog2(MF);

  logic [MF-1:0]         corrupt;
  logic [MF-1:0][R3-1:0] p3;
  logic [R3-1:0]         p2;
  logic [WW-1:0]         ncor;
  logic                  zfed;     // leading zeros of the last block fed

  // ---------------- load ----------------
  logic [BW-1:0]   lb;
  logic [MW-1:0]   lw;
  logic [MW-1:0]   pw;
  logic            take, lastw, is_data;
  logic            re_valid, re_bit;
  logic            p3_valid;
  logic [R3-1:0]   p3_new;
  logic [AW-1:0]   waddr;

  assign lastw    = (int'(lw) == MF - 1);
  assign in_ready = (state == S_LOAD);
  assign take     = in_valid && in_ready;
  assign is_data  = !lastw || (int'(lb) < K3 - R3);
  assign re_valid = (take && is_data) || (state == S_ZERO);
  assign re_bit   = (state == S_ZERO) ? 1'b0 : in_bit;

  bch_encoder #(.M(M3), .N(N3), .K(K3), .T(T3), .PRIM(PRIM3)) u_c3_reenc (
    .clk, .rst_n, .in_valid(re_valid), .in_bit(re_bit),
    .parity_valid(p3_valid), .parity(p3_new));

  // parity of the corrupt dataword from the SPC relation
  logic [R3-1:0] p3_fix;
  always_comb begin
    p3_fix = p2;
    for (int i = 0; i < MF; i++)
      if (!corrupt[i]) p3_fix = p3_fix ^ p3[i];
  end

  // ---------------- output ----------------
  logic [AW-1:0]   raddr;
  logic            rdata;
  logic [MW-1:0]   ow;
  logic [BW-1:0]   ob;
  logic [R3-1:0]   p3_sh;
  logic            s2_valid, s2_src, s2_pbit, s2_first, s2_last, s2_dec;
  logic            s2_bit;
  logic            dec_in_ready, dec_out_valid, dec_out_bit, dec_out_last, dec_fail;
  logic [$clog2(T3+2)-1:0] dec_nerr;
  logic [BW-1:0]   dcnt;
  logic [BW-1:0]   olen;     // data bits of block ow
  logic [BW-1:0]   dskip;    // leading decoder output bits to drop

  assign olen  = (int'(ow) == MF - 1) ? BW'(K3 - R3) : BW'(K3);
  assign dskip = (int'(ow) == MF - 1) ? BW'(R3) : BW'(0);

  frame_buffer #(.WIDTH(1), .DEPTH(MF * K3)) u_buf (
    .clk, .we(take), .waddr, .wdata(in_bit), .raddr, .rdata);

  assign s2_bit = s2_src ? rdata : s2_pbit;

  bch_decoder #(.M(M3), .N(N3), .K(K3), .T(T3), .PRIM(PRIM3)) u_c3_dec (
    .clk, .rst_n, .in_valid(s2_valid && s2_dec), .in_bit(s2_bit), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_bit(dec_out_bit), .out_last(dec_out_last),
    .dec_fail, .n_err(dec_nerr));

  a_dec_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                (s2_valid && s2_dec) |-> dec_in_ready);

  always_comb begin
    if (state == S_DEC) begin
      out_valid = dec_out_valid && (dcnt >= dskip) && (dcnt < dskip + olen);
      out_bit   = dec_out_bit;
      out_first = out_valid && (dcnt == dskip);
      out_last  = out_valid && (dcnt == dskip + olen - 1'b1);
    end else begin
      out_valid = s2_valid && !s2_dec;
      out_bit   = s2_bit;
      out_first = out_valid && s2_first;
      out_last  = out_valid && s2_last;
    end
  end

  assign n_corrupt = ncor;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      corrupt     <= '0;
      p3          <= '0;
      p2          <= '0;
      ncor        <= '0;
      zfed        <= 1'b0;
      lb          <= '0;
      lw          <= '0;
      pw          <= '0;
      waddr       <= '0;
      raddr       <= '0;
      ow          <= '0;
      ob          <= '0;
      p3_sh       <= '0;
      s2_valid    <= 1'b0;
      s2_src      <= 1'b0;
      s2_pbit     <= 1'b0;
      s2_first    <= 1'b0;
      s2_last     <= 1'b0;
      s2_dec      <= 1'b0;
      dcnt        <= '0;
      frame_done  <= 1'b0;
      frame_fail  <= 1'b0;
      n_corrected <= '0;
    end else begin
      frame_done <= 1'b0;
      s2_valid   <= 1'b0;
      if (p3_valid) begin
        p3[pw] <= p3_new;
        pw     <= (int'(pw) == MF - 1) ? '0 : pw + 1'b1;
      end
      unique case (state)
        S_LOAD: if (take) begin
          if (lw == '0 && lb == '0) begin
            // new frame: clear the previous frame's status
            ncor        <= '0;
            corrupt     <= '0;
            frame_fail  <= 1'b0;
            n_corrected <= '0;
          end
          waddr <= waddr + 1'b1;
          if (lastw && !is_data) p2 <= {p2[R3-2:0], in_bit};
          if (int'(lb) == K3 - 1) begin
            lb          <= '0;
            corrupt[lw] <= in_corrupt;
            ncor        <= ((lw == '0) ? WW'(0) : ncor) + WW'(in_corrupt);
            if (lastw) begin
              lw    <= '0;
              state <= S_FIX;
            end else begin
              lw <= lw + 1'b1;
              if (int'(lw) == MF - 2) state <= S_ZERO;
            end
          end else begin
            lb <= lb + 1'b1;
          end
        end
        S_ZERO: begin
          if (int'(lb) == R3 - 1) begin
            lb    <= '0;
            state <= S_LOAD;
          end else begin
            lb <= lb + 1'b1;
          end
        end
        S_FIX: if (!p3_valid && pw == '0) begin
          // all MF parities regenerated
          p3_sh      <= p3_fix;
          frame_fail <= (int'(ncor) > 1);
          raddr      <= '0;
          ow         <= '0;
          ob         <= '0;
          zfed       <= 1'b0;
          state      <= S_OUT;
        end
        S_OUT: begin
          if (corrupt[ow] && int'(ncor) == 1 && int'(ow) == MF - 1 && !zfed) begin
            // shortened last block: implicit leading zeros first
            state <= S_FEEDZ;
          end else begin
            s2_valid <= 1'b1;
            s2_src   <= 1'b1;
            s2_dec   <= corrupt[ow] && int'(ncor) == 1;
            s2_first <= (ob == '0);
            s2_last  <= (ob == olen - 1'b1);
            raddr    <= raddr + 1'b1;
            if (ob == olen - 1'b1) begin
              ob <= '0;
              if (corrupt[ow] && int'(ncor) == 1) begin
                state <= S_FEED;
              end else begin
                if (int'(ow) == MF - 1) state <= S_DONE;
                else        ow    <= ow + 1'b1;
              end
            end else begin
              ob <= ob + 1'b1;
            end
          end
        end
        S_FEEDZ: begin
          s2_valid <= 1'b1;
          s2_src   <= 1'b0;
          s2_dec   <= 1'b1;
          s2_pbit  <= 1'b0;
          if (int'(ob) == R3 - 1) begin
            ob    <= '0;
            zfed  <= 1'b1;
            state <= S_OUT;
          end else begin
            ob <= ob + 1'b1;
          end
        end
        S_FEED: begin
          // recovered parity P3^c behind the data bits
          s2_valid <= 1'b1;
          s2_dec   <= 1'b1;
          s2_src   <= 1'b0;
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
            frame_fail  <= frame_fail | dec_fail;
            n_corrected <= dec_fail ? '0 : dec_nerr;
            dcnt        <= '0;
            // skip the unused tail of the buffer for this block
            raddr       <= AW'((int'(ow) + 1) * K3);
            if (int'(ow) == MF - 1) state <= S_DONE;
            else begin
              ow    <= ow + 1'b1;
              state <= S_OUT;
            end
          end
        end
        S_DONE: if (!s2_valid) begin
          frame_done <= 1'b1;
          waddr      <= '0;
          pw         <= '0;
          state      <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
