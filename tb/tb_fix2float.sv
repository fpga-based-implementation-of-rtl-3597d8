// tb_fix2float: unsigned Q3.29 values (random, powers of two, rounding
// ties, zero and two known conversions) against the simulator's own
// double-to-single conversion; checks the 6-clock latency.
module tb_fix2float;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, nd = 0, rdy;
  logic [31:0] din, dout;
  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] qe [$];
  int qt [$];

  fix2float dut (.clk, .rst, .nd, .din, .rdy, .dout);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

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

  always @(posedge clk) begin
    if (!rst && rdy) begin
      logic [31:0] e;
      int t;
      e = qe.pop_front();  t = qt.pop_front();
      check(cycle - t == 6, "latency");
      check(dout == e, $sformatf("got %h want %h", dout, e));
    end
  end

  task automatic send(input logic [31:0] v, input logic [31:0] e);
    din = v;  nd = 1;
    qe.push_back(e);  qt.push_back(cycle + 1);
    @(posedge clk);
    #1 nd = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send(32'h6AD06C26, 32'h4055A0D8);
    send(32'hC80E7DD0, 32'h40C80E7E);
    send(32'h0, 32'h0);
    for (int i = 0; i < 32; i++) send(32'd1 << i, ref_q29_float(32'd1 << i));
    send(32'hFFFFFFFF, ref_q29_float(32'hFFFFFFFF));
    send(32'h01000080, ref_q29_float(32'h01000080));   // tie, even: down
    send(32'h01000180, ref_q29_float(32'h01000180));   // tie, odd: up
    for (int k = 0; k < 5000; k++) begin
      logic [31:0] v;
      v = $urandom >> $urandom_range(0, 31);
      send(v, ref_q29_float(v));
    end
    repeat (10) @(posedge clk);
    check(qe.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
