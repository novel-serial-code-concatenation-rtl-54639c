// scc_top: the outer part of the serial code concatenation, transmitter and
// receiver side by side. The inner code C1 (an LDPC or turbo product code
// with its own encoder and iterative decoder) sits between them in a real
// link and is not part of this RTL: the transmitter's inner datawords leave on
// the tx_d1_* ports towards the C1 encoder, and the receiver takes the C1
// decoder's datawords, with a per-dataword residual-error flag, on rx_d1_*.
//
//   tx_in_*  -> [BCH C3 encoder -> RS C2 encoder, frame buffer] -> tx_d1_*
//   rx_d1_*  -> [BCH C3 re-encoder -> RS C2 erasure decoder -> BCH C3
//                decoder, frame buffer] -> rx_out_*, rx_frame_* status
//
// Beside it stands the variant optimised for a single corrupt inner codeword
// per frame (tau = 1), where C2 is a set of single-parity-check codes whose
// parity travels in the last inner dataword (spc_tx_* and spc_rx_* ports):
//
//   spc_tx_in_* -> [BCH C3 encoder, SPC accumulator] -> spc_tx_d1_*
//   spc_rx_d1_* -> [BCH C3 re-encoder, SPC parity recovery -> BCH C3
//                   decoder, frame buffer] -> spc_rx_out_*, status
//
// All four parts share clock and active-low asynchronous reset and are
// otherwise independent. The parameters default to the reference
// configurations: m = 36 inner codewords per frame, C3 = BCH[1410,1311,19]
// over GF(2^11), C2 = RS[432,396,37] over GF(2^9), giving 1320-bit inner
// datawords; and for the tau = 1 variant m = 10, C3 = BCH[1397,1320,15] over
// GF(2^11), also with 1320-bit inner datawords. See the four submodules for
// the timing of each part.
module scc_top #(
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
  // tau = 1 variant (same field as C3 above)
  parameter int S_MF  = 10,
  parameter int S_N3  = 1397,
  parameter int S_K3  = 1320,
  parameter int S_T3  = 7,
  localparam int WW   = $clog2(MF + 1),
  localparam int S_WW = $clog2(S_MF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // transmitter: uncoded frame in, inner datawords out
  input  logic          tx_in_valid,
  input  logic          tx_in_bit,
  output logic          tx_in_ready,
  output logic          tx_d1_valid,
  output logic          tx_d1_bit,
  output logic          tx_d1_first,
  output logic          tx_d1_last,
  output logic          tx_d1_frame_last,
  // receiver: inner datawords in (from the C1 decoder), data blocks out
  input  logic          rx_d1_valid,
  input  logic          rx_d1_bit,
  input  logic          rx_d1_corrupt,
  output logic          rx_d1_ready,
  output logic          rx_out_valid,
  output logic          rx_out_bit,
  output logic          rx_out_first,
  output logic          rx_out_last,
  output logic          rx_frame_done,
  output logic [WW-1:0] rx_n_corrupt,
  output logic          rx_erasure_run,
  output logic          rx_rs_fail,
  output logic          rx_bch_fail,
  output logic [$clog2(N2+1)-1:0]    rx_n_erased,
  output logic [$clog2(MF*T3+1)-1:0] rx_n_corrected,
  // tau = 1 variant: transmitter
  input  logic          spc_tx_in_valid,
  input  logic          spc_tx_in_bit,
  output logic          spc_tx_in_ready,
  output logic          spc_tx_d1_valid,
  output logic          spc_tx_d1_bit,
  output logic          spc_tx_d1_first,
  output logic          spc_tx_d1_last,
  output logic          spc_tx_d1_frame_last,
  // tau = 1 variant: receiver
  input  logic          spc_rx_d1_valid,
  input  logic          spc_rx_d1_bit,
  input  logic          spc_rx_d1_corrupt,
  output logic          spc_rx_d1_ready,
  output logic          spc_rx_out_valid,
  output logic          spc_rx_out_bit,
  output logic          spc_rx_out_first,
  output logic          spc_rx_out_last,
  output logic          spc_rx_frame_done,
  output logic [S_WW-1:0] spc_rx_n_corrupt,
  output logic          spc_rx_frame_fail,
  output logic [$clog2(S_T3+2)-1:0] spc_rx_n_corrected
);

  scc_encoder #(
    .MF(MF), .M3(M3), .N3(N3), .K3(K3), .T3(T3), .PRIM3(PRIM3),
    .M2(M2), .N2(N2), .K2(K2), .PRIM2(PRIM2), .FCR2(FCR2)
  ) u_tx (
    .clk, .rst_n,
    .in_valid(tx_in_valid), .in_bit(tx_in_bit), .in_ready(tx_in_ready),
    .out_valid(tx_d1_valid), .out_bit(tx_d1_bit), .out_first(tx_d1_first),
    .out_last(tx_d1_last), .out_frame_last(tx_d1_frame_last));

  scc_decoder #(
    .MF(MF), .M3(M3), .N3(N3), .K3(K3), .T3(T3), .PRIM3(PRIM3),
    .M2(M2), .N2(N2), .K2(K2), .PRIM2(PRIM2), .FCR2(FCR2)
  ) u_rx (
    .clk, .rst_n,
    .in_valid(rx_d1_valid), .in_bit(rx_d1_bit), .in_corrupt(rx_d1_corrupt),
    .in_ready(rx_d1_ready),
    .out_valid(rx_out_valid), .out_bit(rx_out_bit), .out_first(rx_out_first),
    .out_last(rx_out_last), .frame_done(rx_frame_done), .n_corrupt(rx_n_corrupt),
    .erasure_run(rx_erasure_run), .rs_fail(rx_rs_fail), .bch_fail(rx_bch_fail),
    .n_erased(rx_n_erased), .n_corrected(rx_n_corrected));

  spc_scc_encoder #(
    .MF(S_MF), .M3(M3), .N3(S_N3), .K3(S_K3), .T3(S_T3), .PRIM3(PRIM3)
  ) u_spc_tx (
    .clk, .rst_n,
    .in_valid(spc_tx_in_valid), .in_bit(spc_tx_in_bit), .in_ready(spc_tx_in_ready),
    .out_valid(spc_tx_d1_valid), .out_bit(spc_tx_d1_bit), .out_first(spc_tx_d1_first),
    .out_last(spc_tx_d1_last), .out_frame_last(spc_tx_d1_frame_last));

  spc_scc_decoder #(
    .MF(S_MF), .M3(M3), .N3(S_N3), .K3(S_K3), .T3(S_T3), .PRIM3(PRIM3)
  ) u_spc_rx (
    .clk, .rst_n,
    .in_valid(spc_rx_d1_valid), .in_bit(spc_rx_d1_bit), .in_corrupt(spc_rx_d1_corrupt),
    .in_ready(spc_rx_d1_ready),
    .out_valid(spc_rx_out_valid), .out_bit(spc_rx_out_bit), .out_first(spc_rx_out_first),
    .out_last(spc_rx_out_last), .frame_done(spc_rx_frame_done),
    .n_corrupt(spc_rx_n_corrupt), .frame_fail(spc_rx_frame_fail),
    .n_corrected(spc_rx_n_corrected));

endmodule
