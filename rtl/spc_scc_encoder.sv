// spc_scc_encoder: transmitter of the serial concatenation optimised for
// tau = 1 (one corrupt inner codeword per frame), where the outer code C2 is
// a set of R3 single-parity-check (SPC) codes instead of a Reed-Solomon code.
//
// A frame holds MF inner datawords of K3 bits each:
//   D1^i = D3^i                for i = 1 .. MF-1 (K3 uncoded bits each),
//   D1^MF = D~3^MF || P2       (K3-R3 uncoded bits, then R3 SPC parity bits),
// where P3^i is the BCH (C3) parity of D3^i, the last block being taken as
// D3^MF = R3 zeros || D~3^MF, and P2 = P3^1 xor P3^2 xor ... xor P3^MF: bit j
// of P2 is the single parity bit over bit j of all MF parities. P3 itself is
// never sent. The uncoded frame therefore has MF*K3 - R3 bits.
//
// Dataflow: the encoder needs no frame buffer. Each uncoded bit is passed to
// the output one cycle after it is accepted, while the BCH encoder works on
// it; P2 is accumulated in an R3-bit register (one XOR and one flip-flop per
// bit). Before the last block, in_ready is held low for R3 cycles while the
// implicit leading zeros are fed to the BCH encoder. After the last uncoded
// bit, P2 follows on the output after two cycles. out_first/out_last mark
// each inner dataword, out_frame_last the end of the frame. A frame takes
// MF*K3 + 3 cycles.
//
// The frame format follows the tau = 1 scheme of the reference (Example 3:
// m = 10, BCH[1397,1320,15] over GF(2^11), SPC[11,10,2], K1 = 1320). Bit
// order, the serial datapath and the zero-feeding cycles are this design's.
module spc_scc_encoder #(
  parameter int MF    = 10,
  parameter int M3    = 11,
  parameter int N3    = 1397,
  parameter int K3    = 1320,
  parameter int T3    = 7,
  parameter int PRIM3 = 'h805,
  localparam int R3   = N3 - K3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_first,
  output logic out_last,
  output logic out_frame_last
);

  typedef enum logic [1:0] {S_DATA, S_ZERO, S_WAITP, S_PAR} state_t;
  state_t state;

  localparam int BW = $clog2(K3 + 1);
  localparam int MW = $clog2(MF);

  logic [BW-1:0]  b;       // bit index within the current dataword / zero run
  logic [MW-1:0]  w;       // dataword index
  logic           take;
  logic           enc_valid, enc_bit;
  logic           p3_valid;
  logic [R3-1:0]  p3;
  logic [R3-1:0]  p2;      // running SPC parity
  logic [R3-1:0]  p2_sh;
  logic           last_word;

  assign last_word = (int'(w) == MF - 1);
  assign in_ready  = (state == S_DATA);
  assign take      = in_valid && in_ready;
  assign enc_valid = take || (state == S_ZERO);
  assign enc_bit   = (state == S_ZERO) ? 1'b0 : in_bit;

  bch_encoder #(.M(M3), .N(N3), .K(K3), .T(T3), .PRIM(PRIM3)) u_c3_enc (
    .clk, .rst_n, .in_valid(enc_valid), .in_bit(enc_bit),
    .parity_valid(p3_valid), .parity(p3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_DATA;
      b              <= '0;
      w              <= '0;
      p2             <= '0;
      p2_sh          <= '0;
      out_valid      <= 1'b0;
      out_bit        <= 1'b0;
      out_first      <= 1'b0;
      out_last       <= 1'b0;
      out_frame_last <= 1'b0;
    end else begin
      out_valid      <= 1'b0;
      out_first      <= 1'b0;
      out_last       <= 1'b0;
      out_frame_last <= 1'b0;
      if (p3_valid) p2 <= p2 ^ p3;
      unique case (state)
        S_DATA: if (take) begin
          out_valid <= 1'b1;
          out_bit   <= in_bit;
          out_first <= (b == '0);
          if (last_word) begin
            if (int'(b) == K3 - R3 - 1) begin
              b     <= '0;
              state <= S_WAITP;
            end else begin
              b <= b + 1'b1;
            end
          end else if (int'(b) == K3 - 1) begin
            out_last <= 1'b1;
            b        <= '0;
            w        <= w + 1'b1;
            if (int'(w) == MF - 2) state <= S_ZERO;
          end else begin
            b <= b + 1'b1;
          end
        end
        S_ZERO: begin
          if (int'(b) == R3 - 1) begin
            b     <= '0;
            state <= S_DATA;
          end else begin
            b <= b + 1'b1;
          end
        end
        S_WAITP: if (p3_valid) begin
          p2_sh <= p2 ^ p3;
          p2    <= '0;
          state <= S_PAR;
        end
        S_PAR: begin
          out_valid <= 1'b1;
          out_bit   <= p2_sh[R3-1];
          p2_sh     <= p2_sh << 1;
          if (int'(b) == R3 - 1) begin
            out_last       <= 1'b1;
            out_frame_last <= 1'b1;
            b              <= '0;
            w              <= '0;
            state          <= S_DATA;
          end else begin
            b <= b + 1'b1;
          end
        end
        default: state <= S_DATA;
      endcase
    end
  end

endmodule
