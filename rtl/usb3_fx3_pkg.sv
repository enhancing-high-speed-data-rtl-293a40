// usb3_fx3_pkg: widths, sizes and the interface state type shared by the
// FPGA side of the FX3 Slave FIFO bridge.
//
// The bus is 32 bits wide and the FPGA FIFO holds 1024 such words (4 KB);
// both numbers are the design's specified configuration. The state type is the
// three-state read/write switch of the bus master (IDLE, READ, WRITE).
package usb3_fx3_pkg;

  // Width of the bidirectional Slave FIFO data bus and of the FPGA FIFO words.
  localparam int unsigned FX3_DATA_W = 32;

  // Depth of the FPGA FIFO in words (1024 x 32 bit = 4 KB).
  localparam int unsigned FIFO_DEPTH = 1024;

  // Read/write switching state of fx3_rw.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,  // bus idle, no strobe active
    ST_READ  = 2'd1,  // FX3 -> FPGA: SLOE and SLRD active, FIFO written
    ST_WRITE = 2'd2   // FPGA -> FX3: FPGA drives the bus, SLWR active, FIFO read
  } fx3_state_e;

endpackage
