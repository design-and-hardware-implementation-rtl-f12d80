// Frame memory: the random access memory system that holds one picture.
//
// DEPTH words of DW bits, one word per four samples. The interface is that
// of the memory system the display was built around:
//   rp   initiate: starts a cycle when the memory is not busy
//   bcl  byte control: 0 makes the cycle a write, 1 a read
//   ai   address, taken when the cycle starts; di data in, taken likewise
//   do_q data out, valid ACCESS_CLKS clocks after the edge that starts a read
//        and held until the next read; da is high from then until the next
//        cycle
//   mb   memory busy, high from the edge that starts a cycle until a new
//        cycle can start, so that cycles can follow every CYCLE_CLKS clocks
//   gr   general reset: clears the cycle timing, not the stored words
// The access and cycle times (275 ns and 450 ns) are rounded up to whole
// 40 ns clocks. A cycle request while the memory is busy is ignored, and so
// flagged; a general reset during a cycle is also flagged (it would lose data
// in the real memory). Both set the sticky `err` output and an assertion.
// The split (read-modify-write) cycle of the real memory is not used by the
// display and is not built.
module frame_memory #(
  parameter int unsigned DEPTH       = 32768,
  parameter int unsigned AW          = 15,
  parameter int unsigned DW          = 16,
  parameter int unsigned ACCESS_CLKS = 7,
  parameter int unsigned CYCLE_CLKS  = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          gr,
  input  logic          rp,
  input  logic          bcl,
  input  logic [AW-1:0] ai,
  input  logic [DW-1:0] di,
  output logic [DW-1:0] do_q,
  output logic          da,
  output logic          mb,
  output logic          err
);

  localparam int unsigned TW = $clog2(CYCLE_CLKS + 1);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] addr_l;
  logic          rd_l;
  logic [TW-1:0] timer;

  // Storage: a write happens in the clock its cycle is accepted.
  always_ff @(posedge clk) begin
    if (rst_n && !gr && rp && !mb && !bcl) mem[ai] <= di;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mb     <= 1'b0;
      da     <= 1'b0;
      rd_l   <= 1'b0;
      timer  <= '0;
      addr_l <= '0;
      do_q   <= '0;
      err    <= 1'b0;
    end else if (gr) begin
      if (mb) err <= 1'b1;
      mb    <= 1'b0;
      da    <= 1'b0;
      rd_l  <= 1'b0;
      timer <= '0;
    end else begin
      if (rp && !mb) begin
        mb     <= 1'b1;
        da     <= 1'b0;
        rd_l   <= bcl;
        addr_l <= ai;
        timer  <= TW'(1);
      end else begin
        if (rp) err <= 1'b1;
        if (mb) begin
          timer <= timer + 1'b1;
          if (rd_l && timer == TW'(ACCESS_CLKS - 1)) begin
            do_q <= mem[addr_l];
            da   <= 1'b1;
          end
          if (timer == TW'(CYCLE_CLKS - 1)) mb <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(rp && mb && !gr)) else $error("frame_memory: cycle requested while busy");
      assert (!(gr && mb)) else $error("frame_memory: general reset during a memory cycle");
    end
  end

endmodule
