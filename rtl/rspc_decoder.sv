// rspc_decoder: DVD Reed-Solomon product code (RSPC) decoder with inner erasure
// decoding. This is the top of the design.
//
// An ECC block is 208 rows x 182 bytes: 172 columns of data plus 10 bytes of PI
// parity per row (RS(182,172,11)), and 192 rows of data plus 16 rows of PO
// parity per column (RS(208,192,17)). Bytes arrive row by row, as read from the
// disc, each with the error flag the EFMPlus demodulator raises when a 16-bit
// channel word is not in its code table. The decoder runs in three phases:
//
//   INNER  each row goes through an RS(182,172) errors-and-erasures decoder that
//          treats the demodulator flags as erasures, so a row with rho flagged and
//          nu unflagged bad bytes is corrected when rho + 2nu <= 10 (up to 10
//          flagged bytes instead of 5 unknown ones). The 172 data/PO bytes of the
//          corrected row are written to the block buffer; a row that cannot be
//          decoded is marked as failed.
//   OUTER  each of the 172 columns is read from the buffer and decoded by an
//          RS(208,192) decoder that uses the failed-row marks as erasures
//          (rho + 2nu <= 16); the 192 corrected data bytes are written back.
//   OUTPUT the 192 x 172 data bytes are sent out row by row with out_erasure set
//          on bytes of columns the outer decoder could not correct.
//
// Interface: in_valid/in_ready for the 37856 input bytes of a block (in_ready
// is low outside the INNER phase and while the row decoder stalls);
// out_valid/out_ready for the 33024 output bytes, out_last on the final one;
// blk_done pulses with it, and the fail counters hold the number of failed rows
// and columns of the block until the next block starts. A block takes about
// 208*(182+r) + 172*(208+r) + 33024 cycles, r being the erasures per codeword.
// The inner/outer decoding order and the use of the demodulator flags and of the
// inner failures as erasures follow the scheme; the single block buffer, the
// phase sequencing and the interfaces are this design's choices.
module rspc_decoder
  import gf_pkg::*;
#(
  parameter int N_OUT = 208,   // rows, outer code length
  parameter int K_OUT = 192,   // data rows
  parameter int N_IN  = 182,   // bytes per row, inner code length
  parameter int K_IN  = 172,   // data columns
  localparam int AW   = $clog2(N_OUT * K_IN),
  localparam int RW   = $clog2(N_OUT + 1),
  localparam int CLW  = $clog2(N_IN + 1)
)(
  input  logic           clk,
  input  logic           rst_n,
  // demodulated bytes with the demodulator error flag
  input  logic           in_valid,
  output logic           in_ready,
  input  gf_t            in_data,
  input  logic           in_erasure,
  // corrected data field
  output logic           out_valid,
  input  logic           out_ready,
  output gf_t            out_data,
  output logic           out_erasure,
  output logic           out_last,
  // block status
  output logic           blk_done,
  output logic [RW-1:0]  inner_fail_rows,
  output logic [CLW-1:0] outer_fail_cols
);

  typedef enum logic [1:0] {P_INNER, P_OUTER, P_OUTPUT} phase_e;
  phase_e phase;

  gf_t              mem [N_OUT * K_IN];   // block buffer, data + PO columns
  logic [N_OUT-1:0] row_fail;
  logic [K_IN-1:0]  col_fail;

  // ---------------- inner (row) decoder ----------------
  logic           i_in_valid, i_in_ready, i_out_valid, i_out_last, i_out_fail;
  gf_t            i_out_data;
  logic [$clog2(N_OUT * N_IN + 1)-1:0] in_cnt;
  logic [RW-1:0]  ir;          // row being written
  logic [CLW-1:0] ic;          // byte within the row

  assign in_ready   = (phase == P_INNER) && (in_cnt != ($bits(in_cnt))'(N_OUT * N_IN)) && i_in_ready;
  assign i_in_valid = (phase == P_INNER) && (in_cnt != ($bits(in_cnt))'(N_OUT * N_IN)) && in_valid;

  rs_decoder #(.N(N_IN), .K(K_IN)) u_inner (
    .clk, .rst_n,
    .in_valid(i_in_valid), .in_ready(i_in_ready), .in_data, .in_erasure,
    .out_valid(i_out_valid), .out_data(i_out_data), .out_last(i_out_last), .out_fail(i_out_fail)
  );

  // ---------------- outer (column) decoder ----------------
  logic           o_in_valid, o_in_ready, o_in_erasure, o_out_valid, o_out_last, o_out_fail;
  gf_t            o_in_data, o_out_data;
  logic [RW-1:0]  fr, orow;    // feed row / write-back row
  logic [CLW-1:0] fc, ocol;    // feed column / write-back column

  assign o_in_valid   = (phase == P_OUTER) && (fc != CLW'(K_IN));
  assign o_in_data    = mem[AW'(fr) * AW'(K_IN) + AW'(fc)];
  assign o_in_erasure = row_fail[fr];

  rs_decoder #(.N(N_OUT), .K(K_OUT)) u_outer (
    .clk, .rst_n,
    .in_valid(o_in_valid), .in_ready(o_in_ready), .in_data(o_in_data), .in_erasure(o_in_erasure),
    .out_valid(o_out_valid), .out_data(o_out_data), .out_last(o_out_last), .out_fail(o_out_fail)
  );

  // ---------------- output ----------------
  logic [RW-1:0]  pr;
  logic [CLW-1:0] pc;
  assign out_valid   = (phase == P_OUTPUT);
  assign out_data    = mem[AW'(pr) * AW'(K_IN) + AW'(pc)];
  assign out_erasure = col_fail[pc];
  assign out_last    = out_valid && (pr == RW'(K_OUT - 1)) && (pc == CLW'(K_IN - 1));

  // block buffer write port (row results, then column results)
  always_ff @(posedge clk) begin
    if (phase == P_INNER && i_out_valid && ic < CLW'(K_IN))
      mem[AW'(ir) * AW'(K_IN) + AW'(ic)] <= i_out_data;
    else if (phase == P_OUTER && o_out_valid && orow < RW'(K_OUT))
      mem[AW'(orow) * AW'(K_IN) + AW'(ocol)] <= o_out_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase           <= P_INNER;
      in_cnt          <= '0;
      ir              <= '0;
      ic              <= '0;
      fr              <= '0;
      fc              <= '0;
      orow            <= '0;
      ocol            <= '0;
      pr              <= '0;
      pc              <= '0;
      row_fail        <= '0;
      col_fail        <= '0;
      blk_done        <= 1'b0;
      inner_fail_rows <= '0;
      outer_fail_cols <= '0;
    end else begin
      blk_done <= 1'b0;
      case (phase)
        P_INNER: begin
          if (in_valid && in_ready) in_cnt <= in_cnt + 1'b1;
          if (i_out_valid) begin
            if (i_out_last) begin
              ic           <= '0;
              row_fail[ir] <= i_out_fail;
              if (i_out_fail) inner_fail_rows <= inner_fail_rows + 1'b1;
              if (ir == RW'(N_OUT - 1)) begin
                ir    <= '0;
                phase <= P_OUTER;
              end else ir <= ir + 1'b1;
            end else ic <= ic + 1'b1;
          end
        end
        P_OUTER: begin
          if (o_in_valid && o_in_ready) begin
            if (fr == RW'(N_OUT - 1)) begin
              fr <= '0;
              fc <= fc + 1'b1;
            end else fr <= fr + 1'b1;
          end
          if (o_out_valid) begin
            if (o_out_last) begin
              orow           <= '0;
              col_fail[ocol] <= o_out_fail;
              if (o_out_fail) outer_fail_cols <= outer_fail_cols + 1'b1;
              if (ocol == CLW'(K_IN - 1)) begin
                ocol  <= '0;
                phase <= P_OUTPUT;
              end else ocol <= ocol + 1'b1;
            end else orow <= orow + 1'b1;
          end
        end
        default: if (out_ready) begin
          if (pc == CLW'(K_IN - 1)) begin
            pc <= '0;
            if (pr == RW'(K_OUT - 1)) begin
              pr       <= '0;
              fc       <= '0;
              in_cnt   <= '0;
              blk_done <= 1'b1;
              phase    <= P_INNER;
            end else pr <= pr + 1'b1;
          end else pc <= pc + 1'b1;
        end
      endcase
      // counters of a new block start from zero once its first byte is taken
      if (phase == P_INNER && in_cnt == '0 && in_valid && in_ready) begin
        inner_fail_rows <= '0;
        outer_fail_cols <= '0;
      end
    end
  end

  // the buffer is written by one decoder at a time and never while it is read out
  a_outer_only_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    o_out_valid |-> phase == P_OUTER);
  a_inner_only_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    i_out_valid |-> phase == P_INNER);

endmodule
