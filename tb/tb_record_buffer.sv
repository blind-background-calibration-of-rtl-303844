// Testbench for the record buffer (N = 16): random streams with gaps are
// captured; the record must then come back in order, one word per clock from
// address 0, wrapping after N, starting over from 0 whenever replay_en was
// dropped, and a new capture must replace the record. Flags are checked on
// every clock.
//
// capture, in_valid and replay_en are driven after each rising edge and the
// replayed words compared with stored copies at every edge. The record
// buffer is this design's own: it stores one block so the coefficients can
// be estimated in repeated passes over a fixed signal phase.
module tb_record_buffer;
  import cal_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, capture = 0, in_valid = 0, replay_en = 0;
  word_t d_full = 0, d_half = 0, q_full, q_half;
  logic captured, out_valid, replaying;
  int checks = 0, failures = 0;

  record_buffer #(.N(N)) dut (.clk, .rst_n, .capture, .in_valid, .d_full, .d_half,
                              .replay_en, .captured, .out_valid, .q_full, .q_half,
                              .replaying);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t rf[N], rh[N];

  task automatic do_capture();
    int w = 0;
    capture = 1; in_valid = 1; d_full = word_t'($urandom); d_half = word_t'($urandom);
    @(posedge clk); #1;          // the capture edge itself stores nothing
    capture = 0;
    while (w < N) begin
      in_valid = ($urandom_range(0, 3) != 0);
      d_full = word_t'($urandom); d_half = word_t'($urandom);
      if (in_valid) begin rf[w] = d_full; rh[w] = d_half; end
      @(posedge clk); #1;
      if (in_valid) w++;
      checks++;
      if (captured != (w == N) || out_valid) begin
        failures++; $display("capture flags w=%0d captured=%b", w, captured);
      end
    end
    in_valid = 0;
  endtask

  // replay for `len` clocks; the record must come out from address 0 on
  task automatic do_replay(input int len);
    replay_en = 1;
    #1 checks++;
    if (!replaying) begin failures++; $display("replaying low"); end
    for (int i = 0; i < len; i++) begin
      @(posedge clk); #1;
      checks++;
      if (!out_valid || q_full != rf[i % N] || q_half != rh[i % N]) begin
        failures++;
        $display("replay %0d: valid=%b q=%0d/%0d expected %0d/%0d", i, out_valid,
                 q_full, q_half, rf[i % N], rh[i % N]);
      end
    end
    replay_en = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid || replaying) begin failures++; $display("replay did not stop"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (captured) failures++;
    // replay_en before any record does nothing
    replay_en = 1;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (out_valid || replaying) begin failures++; $display("replay without a record"); end
    replay_en = 0;
    for (int r = 0; r < 6; r++) begin
      do_capture();
      do_replay(2 * N + 5);      // wraps, then stops mid-record
      do_replay(7);              // must restart from address 0
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
