// async_fifo: asynchronous FIFO between the classification and channel clocks.
//
// Carries the state codes from the write clock domain into the channel clock
// domain, where the slot length control drains it at the pace of the slot
// lengths. Classic construction: binary and Gray-coded pointers with one extra
// wrap bit, Gray pointers crossing through two-flop synchronisers, registered
// full and empty flags computed from the next pointer values.
//
// Interface: write `wdata` with `winc` while `wfull` is low. The read side is
// first-word fall-through: `rdata` shows the oldest word while `rempty` is low
// and `rinc` removes it. Both resets are synchronous to their own clock and
// should be applied together. Using an asynchronous FIFO follows the design;
// its depth and construction are choices of this implementation.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, wbin_n, wgray_n;
  logic [AW:0] rbin, rgray, rbin_n, rgray_n;
  logic [AW:0] wq1_rgray, wq2_rgray;  // read pointer seen by the writer
  logic [AW:0] rq1_wgray, rq2_wgray;  // write pointer seen by the reader

  // ---------------- write side ----------------
  assign wbin_n  = wbin + (AW+1)'(winc && !wfull);
  assign wgray_n = (wbin_n >> 1) ^ wbin_n;

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin      <= '0;
      wgray     <= '0;
      wfull     <= 1'b0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_n;
      wgray     <= wgray_n;
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      wfull     <= (wgray_n == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
    end
  end

  // ---------------- read side ----------------
  assign rbin_n  = rbin + (AW+1)'(rinc && !rempty);
  assign rgray_n = (rbin_n >> 1) ^ rbin_n;
  assign rdata   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin      <= '0;
      rgray     <= '0;
      rempty    <= 1'b1;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_n;
      rgray     <= rgray_n;
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
      rempty    <= (rgray_n == rq2_wgray);
    end
  end

  // the occupancy seen by the writer never exceeds the depth
  a_no_overflow : assert property (@(posedge wclk) disable iff (wrst)
                                   (wbin - gray2bin(wq2_rgray)) <= (AW+1)'(DEPTH));

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    for (int i = AW; i >= 0; i--) gray2bin[i] = ^(g >> i);
  endfunction

endmodule
