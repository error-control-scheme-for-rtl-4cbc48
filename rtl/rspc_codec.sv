// rspc_codec: the RSPC encoder/decoder pair of a DVD drive's error-control block,
// the top of this design.
//
// The write side (rspc_encoder) turns 192 x 172 data bytes into a 208 x 182 ECC
// block with PO (column RS(208,192)) and PI (row RS(182,172)) parity, sent row by
// row towards the modulator. The read side (rspc_decoder) takes a 208 x 182 block
// as demodulated, with one error flag per byte from the EFMPlus demodulator, and
// corrects it with inner erasure decoding followed by outer erasure decoding.
// Both sides share clock and reset and are otherwise independent: the modulator,
// the disc and the demodulator lie between them. All ports are those of the two
// sub-blocks, prefixed enc_ and dec_; timing is described there.
module rspc_codec
  import gf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // write side: data in, ECC block out
  input  logic       enc_in_valid,
  output logic       enc_in_ready,
  input  gf_t        enc_in_data,
  output logic       enc_out_valid,
  output gf_t        enc_out_data,
  output logic       enc_out_last,
  // read side: demodulated block with error flags in, corrected data out
  input  logic       dec_in_valid,
  output logic       dec_in_ready,
  input  gf_t        dec_in_data,
  input  logic       dec_in_erasure,
  output logic       dec_out_valid,
  input  logic       dec_out_ready,
  output gf_t        dec_out_data,
  output logic       dec_out_erasure,
  output logic       dec_out_last,
  output logic       dec_blk_done,
  output logic [7:0] dec_inner_fail_rows,
  output logic [7:0] dec_outer_fail_cols
);

  rspc_encoder u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_data(enc_out_data), .out_last(enc_out_last)
  );

  rspc_decoder u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_data(dec_in_data), .in_erasure(dec_in_erasure),
    .out_valid(dec_out_valid), .out_ready(dec_out_ready), .out_data(dec_out_data),
    .out_erasure(dec_out_erasure), .out_last(dec_out_last),
    .blk_done(dec_blk_done), .inner_fail_rows(dec_inner_fail_rows), .outer_fail_cols(dec_outer_fail_cols)
  );

endmodule
