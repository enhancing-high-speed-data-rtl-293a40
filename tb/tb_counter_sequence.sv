// tb_counter_sequence: pin-level read-then-write sequence on usb3_fx3_top at
// its default size, with a counting word source instead of an FX3 model.
//
// A free-running counter advances on every rising clock edge. While the FPGA
// holds sloe_n low, the testbench puts the counter value on fx3_data. For the
// first phase fx3_flagd_n is low (readable) and fx3_flaga_n high; then the
// flags swap. Expected results, worked out from the counter alone:
//   - the words pushed into the FIFO are consecutive counter values, one per
//     clock, and their number equals the READ cycles with slrd_n low;
//   - in the write phase the FPGA puts those same words back on the bus in
//     order, one per clock with slwr_n low, then leaves WRITE when the FIFO
//     runs empty and returns to IDLE with the bus released.
module tb_counter_sequence;

  import usb3_fx3_pkg::*;

  localparam int unsigned W          = 32;
  localparam int unsigned READ_PHASE = 150;  // clocks with fx3_flagd_n low

  logic clk = 1'b0;
  always #10 clk = ~clk;  // 50 MHz

  int checks = 0, failures = 0;

  logic         rst_n, flaga_n, flagd_n;
  wire  [W-1:0] fx3_data;
  logic         pktend, sloe_n, slrd_n, slwr_n, empty, full;
  logic [10:0]  fifo_count;
  fx3_state_e   bus_state;
  logic [W-1:0] counter;

  assign fx3_data = (!sloe_n) ? counter : 'z;

  usb3_fx3_top dut (
    .fx3_clk(clk), .rst_n(rst_n), .fx3_data(fx3_data),
    .fx3_flaga_n(flaga_n), .fx3_flagd_n(flagd_n), .pktend(pktend),
    .sloe_n(sloe_n), .slrd_n(slrd_n), .slwr_n(slwr_n),
    .empty(empty), .full(full), .fifo_count(fifo_count), .bus_state(bus_state)
  );

  always @(posedge clk) counter <= counter + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] captured[$];
  int n_written;

  initial begin
    counter = '0;
    rst_n   = 1'b0;
    flaga_n = 1'b1;
    flagd_n = 1'b0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    check(bus_state == ST_IDLE && slrd_n && slwr_n && empty, "idle after reset");

    // Read phase: sample what is pushed at every edge.
    repeat (READ_PHASE) begin
      @(negedge clk);
      check(slwr_n, "no write during read phase");
      if (!slrd_n) captured.push_back(fx3_data);
    end
    // Let the last sampled word be pushed, then swap the flags.
    @(posedge clk); #1;
    check(fifo_count == 11'(captured.size()), "FIFO holds every word read");
    flagd_n = 1'b1;
    flaga_n = 1'b0;
    check(captured.size() == READ_PHASE - 1, $sformatf("%0d words read, expected %0d (one IDLE cycle first)",
          captured.size(), READ_PHASE - 1));
    for (int i = 1; i < captured.size(); i++)
      check(captured[i] == captured[i-1] + 1, $sformatf("read word %0d consecutive", i));

    // Write phase: the same words come back in order, one per clock.
    n_written = 0;
    repeat (READ_PHASE + 10) begin
      @(negedge clk);
      check(slrd_n, "FX3 not read during write phase");
      if (bus_state == ST_WRITE) check(sloe_n, "FX3 output off while the FPGA drives");
      if (!slwr_n) begin
        if (n_written < captured.size())
          check(fx3_data == captured[n_written], $sformatf("written word %0d", n_written));
        n_written++;
      end
    end
    check(n_written == captured.size(), $sformatf("%0d words written, expected %0d", n_written, captured.size()));
    check(empty && bus_state == ST_IDLE, "back in IDLE with an empty FIFO");
    check(pktend == 1'b1, "PKTEND held inactive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
