// tb_usb3_fx3_top: end-to-end testbench of usb3_fx3_top at its default size
// (32-bit bus, 1024-word FIFO), connected to a behavioural FX3 Slave FIFO.
//
// The FX3 model is loaded with a counting sequence of words "from the host".
// The FPGA reads them into its FIFO and writes them back to the FX3's IN
// buffer, so the IN buffer must end up holding the same sequence in order.
// Phase 1 keeps the FX3's IN side busy at first, so the FIFO fills to full at
// one word per clock (1024 words in 1024 clocks is checked), then releases it so
// that reads and writes alternate until everything has looped back. Phase 2
// toggles both FX3 flags at random. The testbench counts each mechanism of the
// bus master (READ and WRITE bursts, leaving READ on a full FIFO and on the FX3
// running dry, leaving WRITE on an empty FIFO and on the FX3 refusing data, the
// idle turn-around cycle) and fails if one never happened.
module tb_usb3_fx3_top;

  import usb3_fx3_pkg::*;

  localparam int unsigned W        = 32;
  localparam int unsigned N_PHASE1 = 3000;
  localparam int unsigned N_PHASE2 = 3000;

  logic clk = 1'b0;
  always #10 clk = ~clk;  // 50 MHz

  int checks = 0, failures = 0;

  logic         rst_n;
  wire  [W-1:0] fx3_data;
  logic         flaga_n, flagd_n, pktend, sloe_n, slrd_n, slwr_n, empty, full;
  logic [10:0]  fifo_count;
  fx3_state_e   bus_state;
  logic         hold_out, hold_in;

  usb3_fx3_top dut (
    .fx3_clk(clk), .rst_n(rst_n), .fx3_data(fx3_data),
    .fx3_flaga_n(flaga_n), .fx3_flagd_n(flagd_n), .pktend(pktend),
    .sloe_n(sloe_n), .slrd_n(slrd_n), .slwr_n(slwr_n),
    .empty(empty), .full(full), .fifo_count(fifo_count), .bus_state(bus_state)
  );

  fx3_slave_model #(.DATA_W(W)) fx3 (
    .clk(clk), .fx3_data(fx3_data), .fx3_flaga_n(flaga_n), .fx3_flagd_n(flagd_n),
    .sloe_n(sloe_n), .slrd_n(slrd_n), .slwr_n(slwr_n), .pktend(pktend),
    .hold_out(hold_out), .hold_in(hold_in)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Mechanism counters, sampled at every rising edge.
  int n_read_burst = 0, n_write_burst = 0, n_exit_full = 0, n_exit_dry = 0;
  int n_exit_empty = 0, n_exit_refused = 0, n_turnaround = 0, n_full_cycles = 0;
  fx3_state_e prev_state = ST_IDLE, prev_busy = ST_IDLE;

  always @(posedge clk) if (rst_n) begin
    // Bus rules seen at the pins.
    check(!(!slrd_n && !slwr_n), "SLRD and SLWR never together");
    check(!(!sloe_n && bus_state == ST_WRITE), "no bus contention");
    check(pktend == 1'b1, "PKTEND inactive");
    if (bus_state == ST_READ  && prev_state == ST_IDLE) n_read_burst++;
    if (bus_state == ST_WRITE && prev_state == ST_IDLE) n_write_burst++;
    if (bus_state != ST_IDLE && bus_state != prev_busy && prev_busy != ST_IDLE) n_turnaround++;
    if (bus_state == ST_READ) begin
      if (full) n_exit_full++;
      else if (flagd_n) n_exit_dry++;
    end
    if (bus_state == ST_WRITE) begin
      if (empty) n_exit_empty++;
      else if (flaga_n) n_exit_refused++;
    end
    if (full) n_full_cycles++;
    prev_state <= bus_state;
    if (bus_state != ST_IDLE) prev_busy <= bus_state;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fill_cycles, total;

  initial begin
    rst_n = 1'b0;
    hold_out = 1'b0;
    hold_in  = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check(bus_state == ST_IDLE && empty && sloe_n && slrd_n && slwr_n, "quiet after reset");
    for (int unsigned i = 0; i < N_PHASE1; i++) fx3.push_out(W'(i + 1));
    rst_n = 1'b1;

    // Phase 1a: the FIFO fills at one word per clock.
    wait (!slrd_n);
    fill_cycles = 0;
    while (!full) begin
      @(posedge clk); #1;
      fill_cycles++;
      if (!full) check(!slrd_n, "SLRD held low while filling");
    end
    check(fill_cycles == int'(FIFO_DEPTH),
          $sformatf("FIFO filled in %0d clocks, expected %0d", fill_cycles, FIFO_DEPTH));
    check(fifo_count == 11'(FIFO_DEPTH), "count at full");
    repeat (20) @(posedge clk);
    #1 check(fx3.reads == int'(FIFO_DEPTH), "no reads while the FIFO is full");

    // Phase 1b: let the FX3 accept data; everything loops back.
    hold_in = 1'b0;
    wait (fx3.writes == int'(N_PHASE1));
    repeat (10) @(posedge clk);
    #1;
    check(empty && bus_state == ST_IDLE, "idle and empty after phase 1");
    for (int unsigned i = 0; i < N_PHASE1; i++)
      check(fx3.in_word(i) == W'(i + 1), $sformatf("phase 1 word %0d", i));

    // Phase 2: both FX3 flags toggled at random.
    for (int unsigned i = 0; i < N_PHASE2; i++) fx3.push_out(W'(32'h8000_0000 + i));
    total = N_PHASE1 + N_PHASE2;
    while (fx3.writes != total) begin
      @(negedge clk);
      hold_out = ($urandom_range(0, 9) < 3);
      hold_in  = ($urandom_range(0, 9) < 3);
    end
    hold_out = 1'b0; hold_in = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    check(empty && bus_state == ST_IDLE, "idle and empty after phase 2");
    for (int unsigned i = 0; i < N_PHASE2; i++)
      check(fx3.in_word(N_PHASE1 + i) == W'(32'h8000_0000 + i), $sformatf("phase 2 word %0d", i));
    check(fx3.reads == total && fx3.writes == total, "word counts match");

    $display("READ bursts %0d, WRITE bursts %0d, READ left on full FIFO %0d, READ left on FX3 empty %0d",
             n_read_burst, n_write_burst, n_exit_full, n_exit_dry);
    $display("WRITE left on empty FIFO %0d, WRITE left on FX3 busy %0d, turn-arounds %0d, full cycles %0d",
             n_exit_empty, n_exit_refused, n_turnaround, n_full_cycles);
    check(n_read_burst > 0,   "a READ burst happened");
    check(n_write_burst > 0,  "a WRITE burst happened");
    check(n_exit_full > 0,    "READ ended on a full FIFO");
    check(n_exit_dry > 0,     "READ ended on the FX3 running dry");
    check(n_exit_empty > 0,   "WRITE ended on an empty FIFO");
    check(n_exit_refused > 0, "WRITE ended on the FX3 refusing data");
    check(n_turnaround > 0,   "a direction turn-around happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
