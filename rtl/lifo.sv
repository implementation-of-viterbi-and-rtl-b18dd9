// lifo: last-in first-out reorder buffer, DEPTH x 1 bit (32 x 1).
//
// A dual-port RAM with a 5-bit up counter as write address and a 5-bit down
// counter as read address. The trace back unit delivers each group of GROUP
// (16) decoded bits newest first; they are written upwards, and read back
// downwards from the group's last address, which yields them oldest first.
// Because the RAM holds two groups, one group is read while the next is
// written. The down counter wraps from 0 to 31, so reading group 0
// (addresses 15..0) leads straight into group 1 (31..16) and back.
//
// wr and rd act only while cs (chip select) is high. group_ready says that a
// complete group is waiting; a read with rd high returns one bit, registered,
// on dout with dout_valid one clock later. Reads while no group is complete
// are ignored. The 32 x 1 size, the up/down addressing and the CS, Write and
// Read controls follow the original architecture; the group count that gates reads is
// this design's choice.
module lifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned GROUP = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned GW   = $clog2(GROUP),
  localparam int unsigned NG   = DEPTH / GROUP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cs,
  input  logic wr,
  input  logic din,
  input  logic rd,
  output logic group_ready,
  output logic dout,
  output logic dout_valid
);

  logic          mem [DEPTH];
  logic [AW-1:0] wptr;     // up counter
  logic [AW-1:0] rptr;     // down counter
  localparam int unsigned GCW = $clog2(NG + 1);
  logic [GCW-1:0] groups;
  logic          do_wr, do_rd, wr_done_grp, rd_done_grp;

  assign do_wr       = cs && wr;
  assign do_rd       = cs && rd && group_ready;
  assign wr_done_grp = do_wr && (wptr[GW-1:0] == '1);
  assign rd_done_grp = do_rd && (rptr[GW-1:0] == '0);
  assign group_ready = (groups != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      rptr       <= AW'(GROUP - 1);
      groups     <= '0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= do_rd;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) begin
        dout <= mem[rptr];
        rptr <= rptr - 1'b1;
      end
      groups <= groups + GCW'(wr_done_grp) - GCW'(rd_done_grp);
    end
  end

  // Writing may never run into a group that has not been read yet.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 wr_done_grp |-> (groups < GCW'(NG)) || rd_done_grp);

endmodule
