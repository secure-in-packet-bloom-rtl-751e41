// tb_sync_fifo -- self-checking test of the show-ahead FIFO used by all
// queues. Random pushes and pops against a queue model, including pushes
// when full together with a pop, and checks of rd_data, full, empty and
// count every cycle. A word written into an empty FIFO is visible on rd_data
// one clock later.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [71:0] wr_data = '0, rd_data;
  logic [3:0] count;
  logic [71:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_both_full = 0;

  always #4 clk = ~clk;

  sync_fifo #(.DEPTH(8)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
                              .full, .empty, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    wr_en = 1'b1; wr_data = 72'h12_3456789a_bcdef012;
    @(negedge clk);
    wr_en = 1'b0;
    check(!empty && rd_data == 72'h12_3456789a_bcdef012, "visible one clock after write");
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
    check(empty, "empty again");
    for (int t = 0; t < 3000; t++) begin
      // random operation, never illegal
      wr_en = ($urandom % 100) < ((t / 500) % 2 ? 30 : 70);
      rd_en = !empty && ($urandom % 100) < ((t / 500) % 2 ? 70 : 30);
      if (full && wr_en && !rd_en) wr_en = 1'b0;
      if (full && wr_en && rd_en) n_both_full++;
      wr_data = {8'($urandom), $urandom, $urandom};
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      if (full) n_full++;
      check(count == 4'(model.size()), $sformatf("count %0d model %0d", count, model.size()));
      check(empty == (model.size() == 0) && full == (model.size() == 8), "flags");
      if (model.size() != 0) check(rd_data == model[0], "head data");
    end
    check(n_full > 0 && n_both_full > 0, "full and push-with-pop while full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
