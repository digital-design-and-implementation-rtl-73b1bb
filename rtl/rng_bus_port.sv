// rng_bus_port: 16-bit host bus interface of the random number generators.
//
// Groups the interface blocks of the generator chip: the input multiplexer
// (steers the data bus into the control register), the control register
// itself, the output multiplexer (drives data or control register onto the bus)
// and Latch16, which holds the upper half of a 32-bit number until the host
// reads it with a second access. The chip has a 16-bit bus, so a 32-bit number
// takes two reads: a read with msw=0 and creg=0 requests a new number, returns
// bits 15:0 and stores bits 31:16 in Latch16; a following read with msw=1
// returns Latch16 and does not disturb the generator.
//
// Handshake (the pin meanings follow the chip; the clocked form is this
// design's choice): the host raises cs with rnw, msw, creg and din valid and
// holds them; ack rises when the transfer can complete, with dout valid for a
// read, and stays high until the host drops cs. A new access starts only after
// cs has been low for at least one clk cycle. Control register writes take
// din[CW-1:0]. During reset the control register loads ctrl_init (used for the
// run-after-reset pin). Data writes (creg=0, rnw=0) complete with no effect.
// Latency: register accesses and upper-word reads raise ack at the first clk
// edge that sees cs; a lower-word read raises ack at the edge after rn_valid.
`timescale 1ns / 1ps
module rng_bus_port
  import trng_pkg::*;
#(
  parameter int CW = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CW-1:0]    ctrl_init,
  input  logic             cs,
  input  logic             rnw,
  input  logic             msw,
  input  logic             creg,
  input  logic [BUS_W-1:0] din,
  output logic [BUS_W-1:0] dout,
  output logic             ack,
  output logic [CW-1:0]    ctrl,
  output logic             sample,
  input  logic [RN_W-1:0]  rn,
  input  logic             rn_valid
);
  typedef enum logic [1:0] {IDLE, WAIT_RN, DONE} state_t;
  state_t           state;
  logic [BUS_W-1:0] lat16;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= IDLE;
      ctrl   <= ctrl_init;
      lat16  <= '0;
      dout   <= '0;
      sample <= 1'b0;
    end else begin
      sample <= 1'b0;
      unique case (state)
        IDLE: if (cs) begin
          state <= DONE;
          if (creg) begin
            if (rnw) dout <= BUS_W'(ctrl);
            else     ctrl <= din[CW-1:0];
          end else if (rnw) begin
            if (msw) dout <= lat16;
            else begin
              sample <= 1'b1;
              state  <= WAIT_RN;
            end
          end
        end
        WAIT_RN: if (rn_valid) begin
          dout  <= rn[BUS_W-1:0];
          lat16 <= rn[RN_W-1:BUS_W];
          state <= DONE;
        end
        DONE: if (!cs) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign ack = (state == DONE) && cs;

  // The host must hold cs until the transfer has completed.
  a_hold_cs: assert property (@(posedge clk) disable iff (rst)
    (state == WAIT_RN) |-> cs);
endmodule
