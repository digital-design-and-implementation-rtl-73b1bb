// osc_counter: free-running counter clocked by a (noisy) ring oscillator, with
// an optional synchronous preload requested from the bus clock domain.
//
// This is the bit-generation element of the adder-shifter generator: the 16-bit
// up counter, the 16-bit down counter, the 5-bit shift count and the 2-bit
// transpose count are all instances of it. The counter advances by +1 (UP=1) or
// -1 (UP=0) on every rising edge of osc_clk and never stops while the oscillator
// runs. Preloading is how the generator feeds each random number back into its
// counters: the bus domain holds preload_data stable and flips preload_req; the
// request toggle is synchronised into the oscillator domain and on its next
// change the counter loads preload_data instead of counting. preload_ack is the
// oscillator-domain copy of the toggle, returned so the bus domain knows when
// the data register may be reused. With PRELOAD=0 the preload port is ignored.
// Timing: a preload takes effect on the third osc_clk edge after the toggle.
// Reset (asynchronous, active high) clears the count.
`timescale 1ns / 1ps
module osc_counter #(
  parameter int W       = 16,
  parameter bit UP      = 1'b1,
  parameter bit PRELOAD = 1'b1
) (
  input  logic         osc_clk,
  input  logic         rst,
  input  logic         preload_req,   // toggle, bus clock domain
  input  logic [W-1:0] preload_data,  // stable while a request is pending
  output logic         preload_ack,   // toggle, equals preload_req once done
  output logic [W-1:0] count
);
  logic req_s;

  sync_2ff u_sync (.clk(osc_clk), .rst(rst), .d(preload_req), .q(req_s));

  always_ff @(posedge osc_clk or posedge rst) begin
    if (rst) begin
      count       <= '0;
      preload_ack <= 1'b0;
    end else begin
      preload_ack <= req_s;
      if (PRELOAD && (req_s != preload_ack)) count <= preload_data;
      else if (UP)                           count <= count + 1'b1;
      else                                   count <= count - 1'b1;
    end
  end
endmodule
