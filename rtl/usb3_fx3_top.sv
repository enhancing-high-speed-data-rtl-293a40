// usb3_fx3_top: FPGA side of a USB 3.0 link built on an FX3 (CYUSB3014)
// peripheral controller running as a synchronous Slave FIFO.
//
// Two blocks, wired as in the reference schematic: fx3_rw masters the FX3's
// 32-bit Slave FIFO bus, and fpga_fifo (32 x 1024 words, 4 KB) stores the
// words that cross it. Words the FX3 offers (fx3_flagd_n low) are read into the
// FIFO; words in the FIFO are written back to the FX3 when it has room
// (fx3_flaga_n low). In the reference design the FIFO's only reader and writer
// is fx3_rw, so data from the host is returned to the host; this is what the
// top does by default.
//
// Ports: the FX3 pins (fx3_clk, rst_n, fx3_data, fx3_flaga_n, fx3_flagd_n,
// pktend, sloe_n, slrd_n, slwr_n) exactly as in the reference schematic, plus
// read-only observation of the FIFO (empty, full, count) and of the bus state.
// All logic runs on fx3_clk (50 MHz in the reference set-up); the FX3 and the
// FPGA share that clock. rst_n is active low; the FIFO is reset while it is low.
module usb3_fx3_top
  import usb3_fx3_pkg::*;
#(
  parameter int unsigned DATA_W = FX3_DATA_W,
  parameter int unsigned DEPTH  = FIFO_DEPTH
) (
  input  logic                       fx3_clk,
  input  logic                       rst_n,
  inout  wire  [DATA_W-1:0]          fx3_data,
  input  logic                       fx3_flaga_n,
  input  logic                       fx3_flagd_n,
  output logic                       pktend,
  output logic                       sloe_n,
  output logic                       slrd_n,
  output logic                       slwr_n,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] fifo_count,
  output fx3_state_e                 bus_state
);

  logic [DATA_W-1:0] fifo_data_in, fifo_data_out;
  logic              fifo_rd_en, fifo_wr_en;
  logic [DATA_W-1:0] bus_o;
  logic              bus_oe;

  // Three-state pad of the Slave FIFO data bus: driven by the FPGA only while
  // fx3_rw is in WRITE, released (high impedance) otherwise.
  assign fx3_data = bus_oe ? bus_o : 'z;

  fpga_fifo #(
    .WIDTH (DATA_W),
    .DEPTH (DEPTH)
  ) fifo (
    .clk    (fx3_clk),
    .rstp   (!rst_n),
    .writep (fifo_wr_en),
    .din    (fifo_data_in),
    .readp  (fifo_rd_en),
    .dout   (fifo_data_out),
    .emptyp (empty),
    .fullp  (full),
    .count  (fifo_count)
  );

  fx3_rw #(
    .DATA_W (DATA_W)
  ) u1 (
    .fx3_clk       (fx3_clk),
    .rst_n         (rst_n),
    .fx3_data_i    (fx3_data),
    .fx3_data_o    (bus_o),
    .fx3_data_oe   (bus_oe),
    .fx3_flaga_n   (fx3_flaga_n),
    .fx3_flagd_n   (fx3_flagd_n),
    .pktend        (pktend),
    .sloe_n        (sloe_n),
    .slrd_n        (slrd_n),
    .slwr_n        (slwr_n),
    .empty         (empty),
    .full          (full),
    .fifo_data_out (fifo_data_out),
    .fifo_data_in  (fifo_data_in),
    .fifo_rd_en    (fifo_rd_en),
    .fifo_wr_en    (fifo_wr_en),
    .state         (bus_state)
  );

endmodule
