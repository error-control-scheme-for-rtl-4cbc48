// rs_fifo: delay buffer for the received symbols of the RS decoder.
//
// The decoder corrects a codeword only after its syndromes, key equation and
// Chien search are done, so every received symbol is written here when stage 1
// accepts it and read back by stage 3 in the same order. DEPTH words of W bits
// in a circular array with a write and a read pointer; rd_data shows the oldest
// word (first-word fall-through) and rd_en removes it. Writing when full or
// reading when empty is a usage error and is caught by assertions. The depth
// (three codewords in flight in the three-stage pipeline) is this design's choice.
module rs_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 624,
  localparam int AW   = $clog2(DEPTH),
  localparam int CNTW = $clog2(DEPTH + 1)
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [W-1:0]    wr_data,
  input  logic            rd_en,
  output logic [W-1:0]    rd_data,
  output logic            empty,
  output logic            full,
  output logic [CNTW-1:0] count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= nxt(wp);
      if (rd_en) rp <= nxt(rp);
      count <= count + CNTW'(wr_en) - CNTW'(rd_en);
    end
  end

  assign rd_data = mem[rp];
  assign empty   = (count == '0);
  assign full    = (count == CNTW'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
