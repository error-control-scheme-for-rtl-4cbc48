// rspc_encoder: builds a DVD RSPC ECC block from 192 x 172 data bytes.
//
// Data arrives row by row and is stored in a block buffer. Then each of the 172
// columns is read out, top to bottom, through an RS(208,192) encoder, and its 16
// PO parity bytes are written below the data (rows 192..207). Finally each of the
// 208 rows is read out through an RS(182,172) encoder, which appends the 10 PI
// parity bytes, and sent on: 208 x 182 bytes, row by row, the order in which the
// block is recorded. PO first and PI second is the encoding order of the product
// code; the single buffer and the phase sequencing are this design's choices.
//
// Interface: in_valid/in_ready for the 33024 data bytes (in_ready is high only
// while loading). The output has no back-pressure: out_valid marks each of the
// 37856 block bytes, out_last the final one. A block takes 33024 + 172*209 +
// 208*182 cycles.
module rspc_encoder
  import gf_pkg::*;
#(
  parameter int N_OUT = 208,
  parameter int K_OUT = 192,
  parameter int N_IN  = 182,
  parameter int K_IN  = 172,
  localparam int AW   = $clog2(N_OUT * K_IN),
  localparam int RW   = $clog2(N_OUT + 1),
  localparam int CLW  = $clog2(N_IN + 1)
)(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_data,
  output logic out_valid,
  output gf_t  out_data,
  output logic out_last
);

  typedef enum logic [1:0] {E_LOAD, E_PO, E_PI} phase_e;
  phase_e phase;

  gf_t mem [N_OUT * K_IN];

  logic [RW-1:0]  lr, fr, pr, orow;
  logic [CLW-1:0] lc, fc, pc, ocol;

  // column (PO) encoder
  logic po_in_valid, po_in_ready, po_out_valid, po_out_last;
  gf_t  po_out_data;
  assign po_in_valid = (phase == E_PO) && (fr != RW'(K_OUT)) && (fc != CLW'(K_IN));
  rs_encoder #(.N(N_OUT), .K(K_OUT)) u_po (
    .clk, .rst_n,
    .in_valid(po_in_valid), .in_ready(po_in_ready), .in_data(mem[AW'(fr) * AW'(K_IN) + AW'(fc)]),
    .out_valid(po_out_valid), .out_data(po_out_data), .out_last(po_out_last)
  );

  // row (PI) encoder
  logic pi_in_valid, pi_in_ready, pi_last;
  assign pi_in_valid = (phase == E_PI) && (pc != CLW'(K_IN));
  rs_encoder #(.N(N_IN), .K(K_IN)) u_pi (
    .clk, .rst_n,
    .in_valid(pi_in_valid), .in_ready(pi_in_ready), .in_data(mem[AW'(pr) * AW'(K_IN) + AW'(pc)]),
    .out_valid, .out_data, .out_last(pi_last)
  );
  assign out_last = pi_last && (pr == RW'(N_OUT - 1));

  assign in_ready = (phase == E_LOAD);

  always_ff @(posedge clk) begin
    if (phase == E_LOAD && in_valid)
      mem[AW'(lr) * AW'(K_IN) + AW'(lc)] <= in_data;
    else if (phase == E_PO && po_out_valid && !po_in_ready)
      mem[AW'(orow) * AW'(K_IN) + AW'(ocol)] <= po_out_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= E_LOAD;
      {lr, fr, pr} <= '0;
      {lc, fc, pc} <= '0;
      orow  <= RW'(K_OUT);
      ocol  <= '0;
    end else begin
      case (phase)
        E_LOAD: if (in_valid) begin
          if (lc == CLW'(K_IN - 1)) begin
            lc <= '0;
            if (lr == RW'(K_OUT - 1)) begin
              lr    <= '0;
              phase <= E_PO;
            end else lr <= lr + 1'b1;
          end else lc <= lc + 1'b1;
        end
        E_PO: begin
          if (po_in_valid && po_in_ready) fr <= fr + 1'b1;
          if (po_out_valid && !po_in_ready) begin
            if (po_out_last) begin
              orow <= RW'(K_OUT);
              fr   <= '0;
              fc   <= fc + 1'b1;
              if (ocol == CLW'(K_IN - 1)) begin
                ocol  <= '0;
                fc    <= '0;
                phase <= E_PI;
              end else ocol <= ocol + 1'b1;
            end else orow <= orow + 1'b1;
          end
        end
        default: begin
          if (pi_in_valid && pi_in_ready) pc <= pc + 1'b1;
          if (pi_last) begin
            pc <= '0;
            if (pr == RW'(N_OUT - 1)) begin
              pr    <= '0;
              phase <= E_LOAD;
            end else pr <= pr + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
