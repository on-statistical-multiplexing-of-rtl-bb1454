// channel_scanner: selects the line buffer to be served next.
//
// The source design picks a channel "through the scanning operation" among
// the line buffers that ask for service. This scanner is a round-robin
// arbiter: starting at the channel after the one served last, it searches
// the request vector (req, one bit per channel) and offers the first
// requesting channel on grant_ch with grant_valid. The offer is
// combinational. The controller pulses advance in the cycle it takes the
// offer; the scan pointer then moves to the channel after grant_ch, so
// every requesting channel is offered within N_CH services. The round-robin
// order is this design's choice.
module channel_scanner
  import smux_pkg::*;
#(
  parameter int unsigned N_CH = N_CH_DEF,
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] req,
  input  logic            advance,
  output logic            grant_valid,
  output logic [CHW-1:0]  grant_ch
);

  logic [CHW-1:0] start;   // first channel to look at

  always_comb begin
    grant_valid = 1'b0;
    grant_ch    = '0;
    for (int unsigned k = 0; k < N_CH; k++) begin
      logic [CHW-1:0] c;
      c = CHW'((int'(start) + k) % N_CH);
      if (!grant_valid && req[c]) begin
        grant_valid = 1'b1;
        grant_ch    = c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start <= '0;
    else if (advance && grant_valid)
      start <= (grant_ch == CHW'(N_CH - 1)) ? '0 : grant_ch + 1'b1;
  end

endmodule
