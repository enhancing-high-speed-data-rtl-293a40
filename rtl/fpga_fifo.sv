// fpga_fifo: single-clock first-in first-out buffer between the FX3 bus master
// and the FPGA's own logic.
//
// It stores the words that cross the USB 3.0 interface. Width and depth default
// to the specified 32 bits x 1024 words (4 KB); there is no change of clock
// domain or width. The storage is a plain memory array with binary read and
// write pointers one bit wider than the address, so full and empty are told
// apart by the extra bit.
//
// Interface: writep pushes din when the FIFO is not full; readp pops the head
// word when it is not empty. A push while full or a pop while empty is ignored.
// dout always shows the head word (first-word fall-through), so a pop consumes
// the word that is on dout in the same cycle. emptyp and fullp are registered
// flags decoded from the registered pointers; count gives the number of stored words.
//
// Timing: a word pushed at one rising edge is on dout, and emptyp is low, after
// that edge. rstp is a synchronous, active-high reset that empties the FIFO.
//
// The port names follow the FIFO core of the reference schematic (din, dout,
// readp, writep, emptyp, fullp, rstp); the fall-through read and the count
// output are this design's choices.
module fpga_fifo #(
  parameter int unsigned WIDTH = usb3_fx3_pkg::FX3_DATA_W,
  parameter int unsigned DEPTH = usb3_fx3_pkg::FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rstp,
  input  logic                     writep,
  input  logic [WIDTH-1:0]         din,
  input  logic                     readp,
  output logic [WIDTH-1:0]         dout,
  output logic                     emptyp,
  output logic                     fullp,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign do_wr = writep && !fullp;
  assign do_rd = readp && !emptyp;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rstp) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr[AW-1:0] == AW'(DEPTH - 1)) ? {~wr_ptr[AW], AW'(0)} : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr[AW-1:0] == AW'(DEPTH - 1)) ? {~rd_ptr[AW], AW'(0)} : rd_ptr + 1'b1;
    end
  end

  assign dout   = mem[rd_ptr[AW-1:0]];
  assign emptyp = (wr_ptr == rd_ptr);
  assign fullp  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);

  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [AW-1:0] fwd_gap, back_gap;

  // Same lap: count = wr - rd. Writer one lap ahead: count = DEPTH - (rd - wr).
  always_comb begin
    fwd_gap  = wr_ptr[AW-1:0] - rd_ptr[AW-1:0];
    back_gap = rd_ptr[AW-1:0] - wr_ptr[AW-1:0];
    if (wr_ptr[AW] == rd_ptr[AW]) count = CW'(fwd_gap);
    else                          count = CW'(DEPTH) - CW'(back_gap);
  end

endmodule
