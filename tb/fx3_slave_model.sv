// fx3_slave_model: behavioural model (not synthesizable) of the Slave FIFO side
// of an FX3 USB 3.0 controller, for testbenches only.
//
// It holds two word buffers. The OUT buffer holds words "from the host" that the
// FPGA reads: while it is not empty fx3_flagd_n is low, and while sloe_n is low
// the model drives the head word onto fx3_data. A rising edge of clk with
// slrd_n low pops one word. The IN buffer takes words "for the host" that the
// FPGA writes: while it has room fx3_flaga_n is low, and a rising edge with
// slwr_n low stores the word on fx3_data.
//
// The flags follow the buffer levels in the same cycle (no flag latency) and
// the read data is available without latency; a real FX3 adds a few cycles of
// both. hold_out and hold_in force the flags inactive, as a busy host would.
// Testbenches load data with push_out() and read results with in_word().
module fx3_slave_model #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned OUT_CAP = 8192,
  parameter int unsigned IN_CAP  = 8192
) (
  input  logic              clk,
  inout  wire  [DATA_W-1:0] fx3_data,
  output logic              fx3_flaga_n,
  output logic              fx3_flagd_n,
  input  logic              sloe_n,
  input  logic              slrd_n,
  input  logic              slwr_n,
  input  logic              pktend,
  input  logic              hold_out,
  input  logic              hold_in
);

  logic [DATA_W-1:0] out_mem [OUT_CAP];
  logic [DATA_W-1:0] in_mem  [IN_CAP];
  int unsigned out_wr = 0, out_rd = 0, in_cnt = 0;
  int unsigned reads = 0, writes = 0, short_pkts = 0;

  assign fx3_flagd_n = hold_out || (out_rd == out_wr);
  assign fx3_flaga_n = hold_in  || (in_cnt >= IN_CAP);
  assign fx3_data    = (!sloe_n) ? out_mem[out_rd % OUT_CAP] : 'z;

  task automatic push_out(input logic [DATA_W-1:0] w);
    out_mem[out_wr % OUT_CAP] = w;
    out_wr++;
  endtask

  function automatic logic [DATA_W-1:0] in_word(input int unsigned i);
    return in_mem[i];
  endfunction

  function automatic int unsigned out_level();
    return out_wr - out_rd;
  endfunction

  always @(posedge clk) begin
    if (!slrd_n && out_rd != out_wr && !hold_out) begin
      out_rd <= out_rd + 1;
      reads  <= reads + 1;
    end
    if (!slwr_n && in_cnt < IN_CAP && !hold_in) begin
      in_mem[in_cnt] <= fx3_data;
      in_cnt         <= in_cnt + 1;
      writes         <= writes + 1;
    end
    if (!pktend) short_pkts <= short_pkts + 1;
  end

endmodule
