// tb_fx3_rw: self-checking testbench of the Slave FIFO bus master fx3_rw.
//
// The testbench drives the FX3 flags (fx3_flaga_n, fx3_flagd_n), the FIFO
// status (empty, full), the FIFO head word and, whenever sloe_n is low, the
// bus as the FX3 would. A reference of the state diagram (IDLE, READ, WRITE)
// written in the testbench predicts every strobe, enable and bus value.
// Directed phases come first, each stepping through one documented transition;
// random flags follow. The test also checks one word per clock: with the flags
// held in READ, slrd_n stays low on every cycle.
module tb_fx3_rw;

  import usb3_fx3_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0;
  always #10 clk = ~clk;  // 50 MHz

  int checks = 0, failures = 0;

  logic         rst_n, flaga_n, flagd_n, empty, full;
  logic [W-1:0] fifo_data_out, fifo_data_in, bus_from_fx3;
  logic [W-1:0] data_i, data_o;
  logic         data_oe;
  logic         pktend, sloe_n, slrd_n, slwr_n, fifo_rd_en, fifo_wr_en;
  fx3_state_e   state;

  // The FX3 side drives the bus while its output enable is on; the FPGA side
  // through data_o/data_oe. The testbench joins them as a pad would.
  always_comb begin
    if (!sloe_n)      data_i = bus_from_fx3;
    else if (data_oe) data_i = data_o;
    else              data_i = '0;
  end

  fx3_rw dut (
    .fx3_clk(clk), .rst_n(rst_n),
    .fx3_data_i(data_i), .fx3_data_o(data_o), .fx3_data_oe(data_oe),
    .fx3_flaga_n(flaga_n), .fx3_flagd_n(flagd_n),
    .pktend(pktend), .sloe_n(sloe_n), .slrd_n(slrd_n), .slwr_n(slwr_n),
    .empty(empty), .full(full), .fifo_data_out(fifo_data_out),
    .fifo_data_in(fifo_data_in), .fifo_rd_en(fifo_rd_en), .fifo_wr_en(fifo_wr_en),
    .state(state)
  );

  typedef enum int {R_IDLE, R_READ, R_WRITE} ref_state_e;
  ref_state_e ref_st;
  int n_to_read = 0, n_to_write = 0, n_read_exit = 0, n_write_exit = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s (ref state %0d)", $time, what, ref_st);
    end
  endtask

  // Check the outputs for the current inputs, then advance the reference
  // across one clock edge.
  task automatic step();
    bit rd, wr;
    #1;
    rd = (ref_st == R_READ)  && !flagd_n && !full;
    wr = (ref_st == R_WRITE) && !flaga_n && !empty;
    check(sloe_n == (ref_st != R_READ), "sloe_n");
    check(slrd_n == !rd, "slrd_n");
    check(slwr_n == !wr, "slwr_n");
    check(fifo_wr_en == rd, "fifo_wr_en");
    check(fifo_rd_en == wr, "fifo_rd_en");
    check(pktend == 1'b1, "pktend inactive");
    check(data_oe == (ref_st == R_WRITE), "bus drive enable");
    if (ref_st == R_WRITE) check(data_o == fifo_data_out, "bus carries FIFO head");
    if (ref_st == R_READ)  check(fifo_data_in == bus_from_fx3, "FIFO gets bus word");
    case (ref_st)
      R_IDLE:
        if (!flagd_n && !full) begin ref_st = R_READ; n_to_read++; end
        else if (!flaga_n && !empty) begin ref_st = R_WRITE; n_to_write++; end
      R_READ:  if (flagd_n || full)  begin ref_st = R_IDLE; n_read_exit++; end
      R_WRITE: if (flaga_n || empty) begin ref_st = R_IDLE; n_write_exit++; end
      default: ref_st = R_IDLE;
    endcase
    @(posedge clk);
    #1;
  endtask

  task automatic drive(input logic fa, input logic fd, input logic em, input logic fu);
    flaga_n = fa; flagd_n = fd; empty = em; full = fu;
    fifo_data_out = $urandom; bus_from_fx3 = $urandom;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int burst;

  initial begin
    rst_n = 1'b0;
    drive(1'b1, 1'b1, 1'b1, 1'b0);
    ref_st = R_IDLE;
    repeat (3) @(posedge clk);
    #1;
    check(state == ST_IDLE, "IDLE after reset");
    rst_n = 1'b1;

    // IDLE stays while neither side can move.
    repeat (3) step();
    check(state == ST_IDLE, "idle with no flags");
    // flaga_n low but the FIFO is empty: no WRITE.
    drive(1'b0, 1'b1, 1'b1, 1'b0); repeat (3) step();
    check(state == ST_IDLE, "no WRITE while FIFO empty");
    // IDLE -> READ on flagd_n == 0; a 64-word burst at one word per clock.
    drive(1'b1, 1'b0, 1'b1, 1'b0); step();
    check(state == ST_READ, "IDLE -> READ");
    burst = 0;
    repeat (64) begin
      drive(1'b1, 1'b0, 1'b0, 1'b0);
      #1 if (!slrd_n) burst++;
      step();
    end
    check(burst == 64, $sformatf("64 reads in 64 clocks, got %0d", burst));
    // READ -> IDLE on flagd_n == 1.
    drive(1'b1, 1'b1, 1'b0, 1'b0); step();
    check(state == ST_IDLE, "READ -> IDLE on flagd_n");
    // IDLE -> WRITE on flaga_n == 0 and empty == 0.
    drive(1'b0, 1'b1, 1'b0, 1'b0); step();
    check(state == ST_WRITE, "IDLE -> WRITE");
    repeat (10) begin drive(1'b0, 1'b1, 1'b0, 1'b0); step(); end
    check(state == ST_WRITE, "stays in WRITE");
    // WRITE -> IDLE on flaga_n == 1.
    drive(1'b1, 1'b1, 1'b0, 1'b0); step();
    check(state == ST_IDLE, "WRITE -> IDLE on flaga_n");
    // READ while the FIFO fills up: leave on full.
    drive(1'b1, 1'b0, 1'b0, 1'b0); step();
    drive(1'b1, 1'b0, 1'b0, 1'b1); step();
    check(state == ST_IDLE, "READ -> IDLE on full");
    // Both directions possible: READ is chosen unless the FIFO is full.
    drive(1'b0, 1'b0, 1'b0, 1'b1); step();
    check(state == ST_WRITE, "full FIFO: WRITE chosen");
    drive(1'b0, 1'b0, 1'b1, 1'b0); step();
    check(state == ST_IDLE, "WRITE -> IDLE on empty");
    drive(1'b0, 1'b0, 1'b0, 1'b0); step();
    check(state == ST_READ, "READ has priority");

    // Random flags.
    repeat (20000) begin
      drive(logic'($urandom_range(0, 3) == 0), logic'($urandom_range(0, 3) == 0),
            logic'($urandom_range(0, 4) == 0), logic'($urandom_range(0, 4) == 0));
      step();
      check(state == fx3_state_e'(ref_st), "state matches reference");
    end
    check(n_to_read > 0 && n_to_write > 0 && n_read_exit > 0 && n_write_exit > 0,
          "all transitions seen");
    // Synchronous reset from WRITE.
    drive(1'b0, 1'b1, 1'b0, 1'b0);
    while (state != ST_WRITE) step();
    rst_n = 1'b0; @(posedge clk); #1;
    check(state == ST_IDLE, "reset returns to IDLE");
    $display("transitions: to READ %0d, to WRITE %0d", n_to_read, n_to_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
