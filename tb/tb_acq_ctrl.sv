// tb_acq_ctrl: plays the projector sync and camera frame-toggle inputs and a
// transfer controller that answers flush with flush_done after a random delay.
// Checks: row_load with base_row on start, arm only after proj_sync, one
// flush per frame (NFRAMES in total), arm dropped after the last frame ends,
// done exactly once after the last flush_done, busy during the run.
module tb_acq_ctrl;
  import sli_pkg::*;
  localparam int NF = 8;
  logic clk = 0, rst = 1, start = 0, proj_sync = 0, frame_toggle = 0, flush_done = 0;
  logic [PAGE_ROW_W-1:0] base_row = 15'd1234, row_val;
  logic arm, row_load, flush, busy, done;
  int checks = 0, failures = 0, flushes = 0, dones = 0, loads = 0;

  acq_ctrl #(.NFRAMES(NF), .FLUSH_WAIT(16)) dut (.clk, .rst, .start, .base_row, .proj_sync, .frame_toggle,
    .arm, .row_load, .row_val, .flush, .flush_done, .busy, .done);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (row_load) begin loads++; check(row_val == base_row, "row value"); end
    if (done) dones++;
  end

  // transfer controller stand-in
  initial begin
    forever begin
      @(posedge clk);
      if (flush && !rst) begin
        flushes++;
        repeat ($urandom_range(1, 40)) @(posedge clk);
        #1 flush_done = 1;
        @(posedge clk);
        #1 flush_done = 0;
        @(posedge clk);
      end
    end
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      int fl0;
      repeat (3) @(posedge clk);
      #1 rst = 0;
      start = 1;
      @(posedge clk);
      #1 start = 0;
      check(busy, "busy after start");
      repeat (50) @(posedge clk);
      check(!arm, "no arm before projector sync");
      #1 proj_sync = 1;
      repeat (8) @(posedge clk);
      #1 proj_sync = 0;
      check(arm, "armed after sync");
      fl0 = flushes;
      for (int f = 0; f < NF; f++) begin
        repeat ($urandom_range(100, 300)) @(posedge clk);
        #1 frame_toggle = !frame_toggle;
        repeat (6) @(posedge clk);
        if (f == NF - 1) check(!arm, "arm dropped after last frame");
        else check(arm, "arm held between frames");
        wait (flushes == fl0 + f + 1);
        wait (!flush);
      end
      repeat (5) @(posedge clk);
      check(dones == run + 1, "one done per run");
      check(!busy, "idle after done");
      check(flushes == (run + 1) * NF, $sformatf("one flush per frame (%0d)", flushes));
      check(loads == run + 1, "one row load per run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
