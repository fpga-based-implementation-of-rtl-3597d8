// tb_sine_rom: reads all 600 entries through both ports (port b walks a
// different order) and compares against round(64 + 60 cos(2 pi a / 600)),
// checking the one-clock read latency. Also checks the table range 4..124.
module tb_sine_rom;
  localparam int D = 600;
  logic clk = 0;
  logic [9:0] addr_a = 0, addr_b = 0;
  logic [7:0] data_a, data_b;
  int checks = 0, failures = 0;

  sine_rom dut (.clk, .addr_a, .addr_b, .data_a, .data_b);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_entry(int a);
    return int'($floor(64.0 + 60.0 * $cos(2.0 * tb_ref_pkg::PI * real'(a) / real'(D)) + 0.5));
  endfunction

  initial begin
    int mn = 255, mx = 0;
    for (int rep = 0; rep < 3; rep++)
      for (int a = 0; a < D; a++) begin
        int b;
        b = (rep == 0) ? (D - 1 - a) : int'($urandom_range(0, D - 1));
        #1 addr_a = 10'(a);  addr_b = 10'(b);
        @(posedge clk);
        #1 addr_a = 10'($urandom_range(0, D - 1));  addr_b = addr_a;   // must not disturb the read
        check(int'(data_a) == ref_entry(a), $sformatf("port a entry %0d = %0d", a, data_a));
        check(int'(data_b) == ref_entry(b), $sformatf("port b entry %0d = %0d", b, data_b));
        if (int'(data_a) < mn) mn = int'(data_a);
        if (int'(data_a) > mx) mx = int'(data_a);
      end
    check(mn == 4 && mx == 124, $sformatf("range %0d..%0d", mn, mx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
