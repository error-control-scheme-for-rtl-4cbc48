// tb_rs_fifo: random pushes and pops on a 13-word buffer against a queue model;
// checks data order, count, empty and full over several pointer wrap-arounds.
`timescale 1ns/1ps
module tb_rs_fifo;
  localparam int DEPTH = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, empty, full;
  logic [7:0] wr_data = 0, rd_data;
  logic [3:0] count;
  int checks = 0, failures = 0;
  bit [7:0] model [$];
  bit saw_full = 0;

  rs_fifo #(.W(8), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(count == 4'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (full) saw_full = 1;
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h vs %h", rd_data, model[0]));
      // bias towards filling in the first half, draining in the second
      wr_en = !full && ($urandom_range(0, 99) < ((t / 250) % 2 ? 30 : 70));
      rd_en = !empty && ($urandom_range(0, 99) < ((t / 250) % 2 ? 70 : 30));
      wr_data = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(saw_full, "buffer never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
