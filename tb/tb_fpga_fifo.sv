// tb_fpga_fifo: self-checking testbench of fpga_fifo.
//
// Two instances are tested side by side: one at the default size (32 x 1024)
// and one with a depth of 5 that is not a power of two. Each gets directed
// phases (fill to full, push while full, drain to empty, pop while empty) and
// then random pushes and pops. A queue in the testbench is the reference for
// dout, emptyp, fullp and count. At the default size, the test also checks that
// exactly 1024 pushes on consecutive clocks take the FIFO from empty to full.
module tb_fpga_fifo;

  localparam int unsigned W = 32;

  logic clk = 1'b0;
  always #10 clk = ~clk;  // 50 MHz

  int checks = 0, failures = 0;

  logic          rst;
  logic          wr_a, rd_a, wr_b, rd_b;
  logic [W-1:0]  din_a, din_b, dout_a, dout_b;
  logic          empty_a, full_a, empty_b, full_b;
  logic [10:0]   count_a;
  logic [2:0]    count_b;

  fpga_fifo dut_a (
    .clk(clk), .rstp(rst), .writep(wr_a), .din(din_a), .readp(rd_a),
    .dout(dout_a), .emptyp(empty_a), .fullp(full_a), .count(count_a)
  );

  fpga_fifo #(.WIDTH(W), .DEPTH(5)) dut_b (
    .clk(clk), .rstp(rst), .writep(wr_b), .din(din_b), .readp(rd_b),
    .dout(dout_b), .emptyp(empty_b), .fullp(full_b), .count(count_b)
  );

  logic [W-1:0] q_a[$], q_b[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Compare both DUTs against their reference queues (before the edge).
  task automatic compare();
    check(empty_a == (q_a.size() == 0), "A emptyp");
    check(full_a  == (q_a.size() == 1024), "A fullp");
    check(count_a == 11'(q_a.size()), "A count");
    if (q_a.size() != 0) check(dout_a == q_a[0], "A dout");
    check(empty_b == (q_b.size() == 0), "B emptyp");
    check(full_b  == (q_b.size() == 5), "B fullp");
    check(count_b == 3'(q_b.size()), "B count");
    if (q_b.size() != 0) check(dout_b == q_b[0], "B dout");
  endtask

  // One clock: compare, then update the reference models as the edge will.
  task automatic step();
    compare();
    // A push is taken only if the FIFO is not full before the edge, and a pop
    // only if it is not empty before the edge.
    begin
      bit push_a, pop_a, push_b, pop_b;
      push_a = wr_a && q_a.size() < 1024;  pop_a = rd_a && q_a.size() != 0;
      push_b = wr_b && q_b.size() < 5;     pop_b = rd_b && q_b.size() != 0;
      if (pop_a) void'(q_a.pop_front());
      if (push_a) q_a.push_back(din_a);
      if (pop_b) void'(q_b.pop_front());
      if (push_b) q_b.push_back(din_b);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fill_cycles;

  initial begin
    {wr_a, rd_a, wr_b, rd_b} = '0;
    din_a = '0; din_b = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    compare();

    // Fill the default-size FIFO on consecutive clocks and count the cycles.
    fill_cycles = 0;
    while (!full_a) begin
      wr_a = 1'b1; din_a = $urandom;
      wr_b = 1'b1; din_b = $urandom;
      step();
      fill_cycles++;
    end
    check(fill_cycles == 1024, $sformatf("fill took %0d cycles, expected 1024", fill_cycles));
    // Pushes into a full FIFO are ignored.
    repeat (4) begin din_a = $urandom; din_b = $urandom; step(); end
    wr_a = 1'b0; wr_b = 1'b0;
    // Drain to empty, then pop while empty.
    rd_a = 1'b1; rd_b = 1'b1;
    repeat (1030) step();
    check(empty_a && empty_b, "both empty after drain");
    rd_a = 1'b0; rd_b = 1'b0;
    // Random traffic, including simultaneous push and pop.
    repeat (20000) begin
      wr_a = ($urandom_range(0, 99) < 55); rd_a = ($urandom_range(0, 99) < 50);
      wr_b = ($urandom_range(0, 99) < 50); rd_b = ($urandom_range(0, 99) < 50);
      din_a = $urandom; din_b = $urandom;
      step();
    end
    // Synchronous reset empties the FIFO.
    {wr_a, rd_a, wr_b, rd_b} = '0;
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    q_a.delete(); q_b.delete();
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
