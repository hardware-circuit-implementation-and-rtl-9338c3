// state_classifier: channel state classification of one sensing decision.
//
// Adds up the packets all stations send at a decision and maps the total to
// the 8-bit state code of the design: none -> idle I (8'h01), exactly one ->
// success U (8'h06), two or more -> collision B (8'h07). `collision` flags B
// for the channel monitors, which use it to start their back-off.
//
// Purely combinational; the asynchronous FIFO registers the code. The three
// codes follow the design, the adder tree is this implementation's.
module state_classifier
  import csma_pkg::*;
#(
  parameter int unsigned N_ST = 2
) (
  input  logic [N_ST-1:0][ATT_W-1:0] attempts,
  output chan_state_e                code,
  output logic                       collision
);

  localparam int unsigned SW = ATT_W + $clog2(N_ST + 1);

  logic [SW-1:0] total;

  always_comb begin
    total = '0;
    for (int i = 0; i < N_ST; i++) total += SW'(attempts[i]);
    if (total == '0)      code = CH_IDLE;
    else if (total == 1)  code = CH_SUCC;
    else                  code = CH_COLL;
  end

  assign collision = (code == CH_COLL);

endmodule
