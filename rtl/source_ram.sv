// source_ram: data source input of the channel system.
//
// A single-clock RAM holds the Poisson arrival stream prepared off-line; each
// word is one sensing decision of length a (one idle slot) and packs the
// packets arriving at the two stations (see csma_pkg). The load port writes
// words at any time. While `run` is high the words at addresses
// 0 .. stream_len-1 are read out in order, wrapping to 0 after the last one,
// under valid/ready flow control; `wrapped` pulses when address 0 is re-read.
//
// Timing: the RAM read is synchronous. A word is fetched whenever the output
// register is empty or being consumed, so a consumer that is always ready gets
// one word per clock. Keeping the stream in a RAM follows the design; the
// depth, the wrap-around and the handshake are choices of this implementation.
module source_ram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // load port
  input  logic             ld_en,
  input  logic [AW-1:0]    ld_addr,
  input  logic [WIDTH-1:0] ld_data,
  // stream control
  input  logic [AW:0]      stream_len,
  input  logic             run,
  // stream out
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             wrapped
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_addr;
  logic             fetch;
  logic             last;

  assign fetch = run && (stream_len != '0) && (!out_valid || out_ready);
  assign last  = ({1'b0, rd_addr} == stream_len - 1'b1);

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
  end

  always_ff @(posedge clk) begin
    if (fetch) out_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_addr   <= '0;
      out_valid <= 1'b0;
      wrapped   <= 1'b0;
    end else begin
      wrapped <= 1'b0;
      if (fetch) begin
        out_valid <= 1'b1;
        if (last) begin
          rd_addr <= '0;
          wrapped <= 1'b1;
        end else begin
          rd_addr <= rd_addr + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // valid/ready rule: a word that is offered stays offered, unchanged, until taken
  a_hold : assert property (@(posedge clk) disable iff (rst)
                            out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
