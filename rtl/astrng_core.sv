// astrng_core: datapath of the adder-shifter true random number generator.
//
// Four free-running counters, each clocked by its own ring oscillator, produce
// the raw bits: a 16-bit up counter and a 16-bit down counter (together the
// 32-bit "adder"), a 5-bit shift count and a 2-bit transpose count. When a
// number is requested (sample, one clk cycle) all four counts are captured in
// the bus clock domain (the counter latches); the counters keep running. The
// captured word {up, down} is rotated left by the captured shift count and its
// bits are then reversed within 32-, 16-, 8- or 4-bit groups according to the
// captured transpose count. The result is the random number. Unless
// inhibit_fb is set, it is also fed back as a synchronous preload of the two
// counters (up counter <- bits 31:16, down counter <- bits 15:0), so that each
// sample moves the counters to a new point of their range and the jitter seen
// during every sample period is kept ("divergent paths").
//
// Timing: rn is valid, with rn_valid high for one clk cycle, two clk cycles
// after sample. A feedback preload is launched in the same cycle if the
// previous one has been acknowledged by both counters; otherwise that number
// is not fed back. Capturing a count from a free-running clock domain is
// deliberate here: the sampling instant relative to the oscillator is part of
// the randomness. The half assignment of the feedback word and the skip rule
// are this design's choices.
`timescale 1ns / 1ps
module astrng_core
  import trng_pkg::*;
(
  input  logic            clk,        // bus clock
  input  logic            rst,        // asynchronous, active high
  input  logic            clk_up,     // ring oscillator of the up counter
  input  logic            clk_dn,     // ring oscillator of the down counter
  input  logic            clk_sh,     // ring oscillator of the shift count
  input  logic            clk_tr,     // ring oscillator of the transpose count
  input  logic            sample,
  input  logic            inhibit_fb,
  output logic [RN_W-1:0] rn,
  output logic            rn_valid,
  output logic            fb_launched  // a feedback preload started this cycle
);
  logic [15:0] up_cnt, dn_cnt, up_lat, dn_lat;
  logic [4:0]  sh_cnt, sh_lat;
  logic [1:0]  tr_cnt, tr_lat;
  logic [31:0] rotated, transposed, fb_data;
  logic        fb_req, up_ack, dn_ack, up_ack_s, dn_ack_s, lat_valid;
  logic        fb_idle;
  logic        sh_ack_nc, tr_ack_nc;  // shift/transpose counts have no preload

  osc_counter #(.W(16), .UP(1'b1), .PRELOAD(1'b1)) u_up (
    .osc_clk(clk_up), .rst(rst), .preload_req(fb_req), .preload_data(fb_data[31:16]),
    .preload_ack(up_ack), .count(up_cnt));
  osc_counter #(.W(16), .UP(1'b0), .PRELOAD(1'b1)) u_dn (
    .osc_clk(clk_dn), .rst(rst), .preload_req(fb_req), .preload_data(fb_data[15:0]),
    .preload_ack(dn_ack), .count(dn_cnt));
  osc_counter #(.W(5), .UP(1'b1), .PRELOAD(1'b0)) u_sh (
    .osc_clk(clk_sh), .rst(rst), .preload_req(1'b0), .preload_data('0),
    .preload_ack(sh_ack_nc), .count(sh_cnt));
  osc_counter #(.W(2), .UP(1'b1), .PRELOAD(1'b0)) u_tr (
    .osc_clk(clk_tr), .rst(rst), .preload_req(1'b0), .preload_data('0),
    .preload_ack(tr_ack_nc), .count(tr_cnt));

  sync_2ff u_up_ack (.clk(clk), .rst(rst), .d(up_ack), .q(up_ack_s));
  sync_2ff u_dn_ack (.clk(clk), .rst(rst), .d(dn_ack), .q(dn_ack_s));

  // Counter latches: capture all four counts when a number is read.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      up_lat    <= '0;
      dn_lat    <= '0;
      sh_lat    <= '0;
      tr_lat    <= '0;
      lat_valid <= 1'b0;
    end else begin
      lat_valid <= sample;
      if (sample) begin
        up_lat <= up_cnt;
        dn_lat <= dn_cnt;
        sh_lat <= sh_cnt;
        tr_lat <= tr_cnt;
      end
    end
  end

  barrel_rotator #(.W(32)) u_rot (.din({up_lat, dn_lat}), .amount(sh_lat), .dout(rotated));
  bit_transposer u_tp (.din(rotated), .sel(tr_lat), .dout(transposed));

  assign fb_idle = (fb_req == up_ack_s) && (fb_req == dn_ack_s);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rn          <= '0;
      rn_valid    <= 1'b0;
      fb_req      <= 1'b0;
      fb_data     <= '0;
      fb_launched <= 1'b0;
    end else begin
      rn_valid    <= lat_valid;
      fb_launched <= 1'b0;
      if (lat_valid) begin
        rn <= transposed;
        if (!inhibit_fb && fb_idle) begin
          fb_data     <= transposed;
          fb_req      <= ~fb_req;
          fb_launched <= 1'b1;
        end
      end
    end
  end
endmodule
