// Testbench for the block sequencer (N = 5): with random gaps in the sample
// stream and cal_en dropped now and then, first/last must mark every 1st and
// 5th sample counted since the block began, a drop of cal_en must restart
// the count, and the completed-block counter must match.
//
// Samples and cal_en change after each rising edge; first, last and the block
// counter are checked at every edge against a counter kept here. Blocks of a
// fixed length, and restarting on a drop of cal_en, are this design's own
// way of sequencing the sums; the source gives no sequencer.
module tb_cal_controller;
  logic clk = 0, rst_n = 0, cal_en = 0, in_valid = 0;
  logic blk_valid, first, last;
  logic [31:0] blocks;
  int checks = 0, failures = 0;

  cal_controller #(.N(5)) dut (.clk, .rst_n, .cal_en, .in_valid, .blk_valid, .first, .last, .blocks);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, done;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m = 0; done = 0;
    for (int k = 0; k < 3000; k++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      cal_en = !(k % 173 > 160);
      #1;
      checks += 3;
      if (blk_valid != (in_valid && cal_en)) begin failures++; $display("blk_valid k=%0d", k); end
      if (first != (blk_valid && m == 0)) begin failures++; $display("first k=%0d m=%0d", k, m); end
      if (last != (blk_valid && m == 4)) begin failures++; $display("last k=%0d m=%0d", k, m); end
      @(posedge clk); #1;
      if (!cal_en) m = 0;
      else if (in_valid) begin
        if (m == 4) begin m = 0; done++; end
        else m++;
      end
      checks++;
      if (blocks != 32'(done)) begin failures++; $display("blocks=%0d expected %0d", blocks, done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
