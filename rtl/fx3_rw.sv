// fx3_rw: FPGA-side master of the FX3 (CYUSB3014) synchronous Slave FIFO bus.
//
// The FPGA is the bus master; the FX3's GPIF II port is the slave. Two active-low
// flags from the FX3 tell the master what it may do: fx3_flagd_n low means the
// FX3 holds data for the FPGA (readable), fx3_flaga_n low means the FX3 can
// accept data from the FPGA (writable). A three-state machine switches the bus
// between the two directions:
//
//   IDLE  -> READ   when fx3_flagd_n == 0 (and the FPGA FIFO is not full)
//   IDLE  -> WRITE  when fx3_flaga_n == 0 and empty == 0
//   READ  -> IDLE   when fx3_flagd_n == 1 (or the FPGA FIFO is full)
//   WRITE -> IDLE   when fx3_flaga_n == 1 (or the FPGA FIFO is empty)
//
// The transitions on the flags and on empty follow the specified state diagram.
// The extra exits on a full or empty FPGA FIFO, the full input, and giving READ
// priority when both directions are possible in IDLE are this design's choices:
// without them a loop-back of FX3 data through the FIFO could lock up in READ
// with a full FIFO.
//
// READ: sloe_n is low for the whole state so the FX3 drives fx3_data. Each
// cycle in which fx3_flagd_n is low and the FIFO is not full, slrd_n is low and
// the word on the bus is written into the FIFO (fifo_wr_en) at the same rising
// edge at which the FX3 advances to its next word.
// WRITE: the FPGA drives the FIFO head word (fifo_data_out) onto fx3_data for
// the whole state. Each cycle in which fx3_flaga_n is low and the FIFO is not
// empty, slwr_n is low and fifo_rd_en pops that word, so the FX3 and the FIFO
// take the same word at the same edge.
// The IDLE cycle between the two states is the bus turn-around: nobody drives
// the bus in IDLE.
//
// The bidirectional fx3_data pin is split here into fx3_data_i (bus as seen by
// the FPGA), fx3_data_o and its enable fx3_data_oe; the enclosing level joins
// them into one three-state pin. Splitting the pin is this design's choice (the
// reference schematic draws one inout port) so that the block stays free of
// internal three-state nets.
//
// pktend is held high (inactive): no short packets are committed, as in the
// reference schematic, where PKTEND is tied to logic 1.
//
// Timing: the state register changes on the rising edge of fx3_clk; strobes
// and FIFO enables are decoded from the state and the current flags, so a word
// moves in every cycle the flags allow (one 32-bit word per clock). rst_n is a
// synchronous, active-low reset to IDLE.
module fx3_rw
  import usb3_fx3_pkg::*;
#(
  parameter int unsigned DATA_W = FX3_DATA_W
) (
  input  logic              fx3_clk,
  input  logic              rst_n,
  // FX3 Slave FIFO pins
  input  logic [DATA_W-1:0] fx3_data_i,
  output logic [DATA_W-1:0] fx3_data_o,
  output logic              fx3_data_oe,
  input  logic              fx3_flaga_n,
  input  logic              fx3_flagd_n,
  output logic              pktend,
  output logic              sloe_n,
  output logic              slrd_n,
  output logic              slwr_n,
  // FPGA FIFO side
  input  logic              empty,
  input  logic              full,
  input  logic [DATA_W-1:0] fifo_data_out,
  output logic [DATA_W-1:0] fifo_data_in,
  output logic              fifo_rd_en,
  output logic              fifo_wr_en,
  // Observation of the state machine
  output fx3_state_e        state
);

  fx3_state_e state_nx;
  logic       rd_go, wr_go;

  always_ff @(posedge fx3_clk) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_IDLE: begin
        if (!fx3_flagd_n && !full)      state_nx = ST_READ;
        else if (!fx3_flaga_n && !empty) state_nx = ST_WRITE;
      end
      ST_READ:  if (fx3_flagd_n || full)  state_nx = ST_IDLE;
      ST_WRITE: if (fx3_flaga_n || empty) state_nx = ST_IDLE;
      default:  state_nx = ST_IDLE;
    endcase
  end

  assign rd_go = (state == ST_READ)  && !fx3_flagd_n && !full;
  assign wr_go = (state == ST_WRITE) && !fx3_flaga_n && !empty;

  assign sloe_n     = (state != ST_READ);
  assign slrd_n     = !rd_go;
  assign slwr_n     = !wr_go;
  assign pktend     = 1'b1;
  assign fifo_wr_en = rd_go;
  assign fifo_rd_en = wr_go;

  // Three-state data bus, split into its two directions: the FPGA drives it
  // only in WRITE. The pad buffer itself sits in the top level.
  assign fx3_data_oe  = (state == ST_WRITE);
  assign fx3_data_o   = fifo_data_out;
  assign fifo_data_in = fx3_data_i;

  // Bus rules: the FX3 is never read and written in the same cycle, and the
  // FPGA never drives the bus while the FX3 output enable is on.
  a_no_rd_wr_together: assert property (@(posedge fx3_clk) disable iff (!rst_n)
    !(!slrd_n && !slwr_n));
  a_no_bus_contention: assert property (@(posedge fx3_clk) disable iff (!rst_n)
    !(!sloe_n && state == ST_WRITE));
  a_no_fifo_overflow: assert property (@(posedge fx3_clk) disable iff (!rst_n)
    fifo_wr_en |-> !full);
  a_no_fifo_underflow: assert property (@(posedge fx3_clk) disable iff (!rst_n)
    fifo_rd_en |-> !empty);

endmodule
