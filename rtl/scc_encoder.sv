// scc_encoder: transmitter side of the serial code concatenation with two
// short outer codes (C3 = binary BCH, C2 = Reed-Solomon) in front of an inner
// LDPC or turbo product code C1, which is outside this module.
//
// A frame of MF*K3 uncoded bits is cut into MF data blocks D3^i of K3 bits.
//  1. Each D3^i is BCH-encoded; only its R3 = N3-K3 parity bits P3^i are kept.
//  2. The MF parity blocks, taken in order and cut into M2-bit symbols, form
//     the single Reed-Solomon dataword D2 (K2 = MF*R3/M2 symbols). Its
//     NPAR2 = N2-K2 parity symbols P2 (P2BITS bits) are computed.
//  3. P2 is cut into MF slices; slice i holds bits i*P2BITS/MF up to
//     (i+1)*P2BITS/MF - 1 (rounded down), so all slices are equal when MF
//     divides P2BITS and differ by one bit otherwise. The inner
//     dataword D1^i = D3^i || slice i of P2 (K1 = K3 + slice bits) is sent
//     to the C1 encoder. P3^i itself is never transmitted.
//
// Generalized form (parameter G > 0): the top G bits of each P3^i are not
// protected by C2 but sent inside D1^i, right after D3^i, so that the
// receiver can detect corrupt datawords by itself; only the remaining
// RD = R3 - G bits of each P3^i enter D2, and D1^i = D3^i || top G bits of
// P3^i || slice i. G = 0 (the default) is the basic scheme.
//
// Dataflow: in_bit/in_valid are accepted while in_ready is high (the load
// phase). Each bit goes to the frame buffer and to the BCH encoder; each P3^i
// is fed to the RS encoder, one symbol per cycle, while the next block is
// still loading. When P2 is ready, the MF datawords D1^i leave one bit per
// cycle on out_bit/out_valid, with out_first/out_last marking the first and
// last bit of each D1^i and out_frame_last the last bit of the frame. The
// output cannot be stalled. A frame needs MF*K3 load cycles, about 2 + SYM3
// cycles to finish P2, and MF*K1 + 1 output cycles; loading of the next frame
// starts after the output phase (one frame buffer, no double buffering).
//
// The code sizes and the three-step encoding order follow the reference
// configuration (m = 36, BCH[1410,1311] C3, RS[432,396] over GF(2^9) C2, so
// K1 = 1320, the dimension of the [2640,1320] inner LDPC code), and the G
// detection bits the reference's generalized scheme. The bit and symbol order,
// which G parity bits are sent (the highest), the serial datapath and the
// single buffer are this design's.
module scc_encoder #(
  parameter int MF    = 36,       // m, inner codewords per frame
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
  localparam int AW     = $clog2(MF * K3)
) (
  input  logic clk,
  input  logic rst_n,
  // uncoded frame
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  // inner datawords D1^i towards the C1 encoder
  output logic out_valid,
  output logic out_bit,
  output logic out_first,
  output logic out_last,
  output logic out_frame_last
);

  if (G < 0 || G >= R3 || RD % M2 != 0 || MF * SYM3 != K2) begin : g_bad_sizes
    $error("scc_encoder: code sizes do not tile the frame");
  end

  // D1^i length: slice i of P2 is bits [i*P2BITS/MF, (i+1)*P2BITS/MF), so
  // slices differ by at most one bit when P2BITS is not a multiple of MF.
  function automatic logic [MF-1:0][15:0] d1_lens();
    for (int w = 0; w < MF; w++)
      d1_lens[w] = 16'(K3 + G + ((w + 1) * P2BITS) / MF - (w * P2BITS) / MF);
  endfunction
  localparam logic [MF-1:0][15:0] D1LEN = d1_lens();

  typedef enum logic [1:0] {S_LOAD, S_WAITP, S_OUT} state_t;
  state_t state;

  // ---------------- load phase ----------------
  logic [AW-1:0]               waddr;
  logic [$clog2(K3)-1:0]       bcnt;
  logic [$clog2(MF)-1:0]       wcnt;
  logic                        take;
  logic                        p3_valid;
  logic [R3-1:0]               p3;
  logic [R3-1:0]               p3_sh;
  logic [$clog2(SYM3+1)-1:0]   p3_left;
  logic                        rs_in_valid;
  logic                        p2_valid;
  logic [NPAR2-1:0][M2-1:0]    p2;
  logic [MF-1:0][GW-1:0]       phat;    // detection bits of each block
  logic [$clog2(MF)-1:0]       pw;

  assign in_ready    = (state == S_LOAD);
  assign take        = in_valid && in_ready;
  assign rs_in_valid = (p3_left != '0);

  bch_encoder #(.M(M3), .N(N3), .K(K3), .T(T3), .PRIM(PRIM3)) u_c3_enc (
    .clk, .rst_n, .in_valid(take), .in_bit,
    .parity_valid(p3_valid), .parity(p3));

  rs_encoder #(.M(M2), .N(N2), .K(K2), .PRIM(PRIM2), .FCR(FCR2)) u_c2_enc (
    .clk, .rst_n, .in_valid(rs_in_valid), .in_sym(p3_sh[R3-1 -: M2]),
    .parity_valid(p2_valid), .parity(p2));

  // ---------------- output phase ----------------
  logic [AW-1:0]               raddr;
  logic                        rdata;
  logic [$clog2(K1)-1:0]       ob;      // bit within D1^i
  logic [$clog2(MF)-1:0]       ow;      // word index
  logic [P2BITS-1:0]           p2_sh;
  // second pipeline stage (aligned with the buffer's read data)
  logic                        s2_valid, s2_data, s2_pbit, s2_first, s2_last, s2_flast;

  frame_buffer #(.WIDTH(1), .DEPTH(MF * K3)) u_buf (
    .clk, .we(take), .waddr, .wdata(in_bit), .raddr, .rdata);

  assign out_valid      = s2_valid;
  assign out_bit        = s2_data ? rdata : s2_pbit;
  assign out_first      = s2_valid && s2_first;
  assign out_last       = s2_valid && s2_last;
  assign out_frame_last = s2_valid && s2_flast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      waddr    <= '0;
      bcnt     <= '0;
      wcnt     <= '0;
      p3_sh    <= '0;
      p3_left  <= '0;
      phat     <= '0;
      pw       <= '0;
      raddr    <= '0;
      ob       <= '0;
      ow       <= '0;
      p2_sh    <= '0;
      s2_valid <= 1'b0;
      s2_data  <= 1'b0;
      s2_pbit  <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      s2_flast <= 1'b0;
    end else begin
      // P3 blocks to the RS encoder, one M2-bit symbol per cycle
      if (p3_valid) begin
        p3_sh    <= p3 << G;
        p3_left  <= ($clog2(SYM3+1))'(SYM3);
        phat[pw] <= GW'(p3 >> RD);
        pw       <= (int'(pw) == MF - 1) ? '0 : pw + 1'b1;
      end else if (p3_left != '0) begin
        p3_sh   <= p3_sh << M2;
        p3_left <= p3_left - 1'b1;
      end

      s2_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (take) begin
          waddr <= waddr + 1'b1;
          if (bcnt == ($clog2(K3))'(K3 - 1)) begin
            bcnt <= '0;
            if (wcnt == ($clog2(MF))'(MF - 1)) begin
              wcnt  <= '0;
              state <= S_WAITP;
            end else begin
              wcnt <= wcnt + 1'b1;
            end
          end else begin
            bcnt <= bcnt + 1'b1;
          end
        end
        S_WAITP: if (p2_valid) begin
          p2_sh <= p2;
          raddr <= '0;
          ob    <= '0;
          ow    <= '0;
          state <= S_OUT;
        end
        S_OUT: begin
          s2_valid <= 1'b1;
          s2_data  <= (int'(ob) < K3);
          s2_pbit  <= (int'(ob) >= K3 && int'(ob) < K3 + G) ? phat[ow][GW - 1 - (int'(ob) - K3)] : p2_sh[P2BITS-1];
          s2_first <= (ob == '0);
          s2_last  <= (ob == ($clog2(K1))'(D1LEN[ow] - 1'b1));
          s2_flast <= (ob == ($clog2(K1))'(D1LEN[ow] - 1'b1)) && (ow == ($clog2(MF))'(MF - 1));
          if (int'(ob) < K3) raddr <= raddr + 1'b1;
          else if (int'(ob) >= K3 + G) p2_sh <= p2_sh << 1;
          if (ob == ($clog2(K1))'(D1LEN[ow] - 1'b1)) begin
            ob <= '0;
            if (ow == ($clog2(MF))'(MF - 1)) begin
              ow    <= '0;
              waddr <= '0;
              state <= S_LOAD;
            end else begin
              ow <= ow + 1'b1;
            end
          end else begin
            ob <= ob + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
