// rs_arbiter: two-channel arbiter in the form of an RS flip-flop made of two
// OR-NO (NOR) elements, D1 and D2.
//
// Source S1 drives R and source S2 drives S, both active low (a source pulls
// its DEM line to 0 to ask for the receiver).  Q = 1 opens S1's channel and
// Qbar = 1 opens S2's.  With both inputs at 1 (idle) both outputs are 0,
// which is the normally "forbidden" input state of an RS flip-flop that this
// scheme puts to use.  Behaviour:
//   * R falls while Qbar = 0  ->  Q rises and stays 1 until R rises again,
//     whatever S does;
//   * S falls while Q = 0     ->  Qbar rises and stays 1 until S rises again,
//     whatever R does;
//   * when the holder releases, the other side takes over at once if it is
//     demanding, else both outputs return to 0.
//
// Clocked realization.  The cross-coupled NOR pair is asynchronous and
// settles a simultaneous R/S fall by whichever gate is faster.  Here the
// state is held in two flip-flops (`q`, `q_bar`) updated on the clock edge,
// and a simultaneous fall is settled in favour of S1 (Q); that choice is this
// design's.  R and S pass a SYNC_STAGES-deep synchronizer, so a change stable
// at r_n/s_n shows at q/q_bar SYNC_STAGES+1 rising edges later.  Reset is
// asynchronous and active low and gives Q = Qbar = 0.
module rs_arbiter #(
    parameter int unsigned SYNC_STAGES = 2
) (
    input  logic clk,
    input  logic rst_n,
    input  logic r_n,
    input  logic s_n,
    output logic q,
    output logic q_bar
);

  logic [1:0] dem_s_n;   // {S, R} synchronized, active low
  logic       r_req, s_req;
  logic       q_d, q_bar_d;

  demand_sync #(.N(2), .SYNC_STAGES(SYNC_STAGES)) u_sync (
      .clk          (clk),
      .rst_n        (rst_n),
      .demand_n     ({s_n, r_n}),
      .demand_sync_n(dem_s_n)
  );

  assign r_req = ~dem_s_n[0];
  assign s_req = ~dem_s_n[1];

  // D1: Q may be (or stay) 1 only while R is low and Qbar is not held.
  // D2: Qbar may be (or stay) 1 only while S is low and Q is not held.
  always_comb begin
    if (q && r_req) begin
      q_d     = 1'b1;
      q_bar_d = 1'b0;
    end else if (q_bar && s_req) begin
      q_d     = 1'b0;
      q_bar_d = 1'b1;
    end else begin
      q_d     = r_req;
      q_bar_d = s_req && !r_req;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= 1'b0;
      q_bar <= 1'b0;
    end else begin
      q     <= q_d;
      q_bar <= q_bar_d;
    end
  end

  // Q and Qbar are never 1 together.
  a_exclusive : assert property (@(posedge clk) disable iff (!rst_n) !(q && q_bar));
  // The source that holds the receiver keeps it while it demands.
  a_hold_q : assert property (@(posedge clk) disable iff (!rst_n) q && r_req |=> q);
  a_hold_qb : assert property (@(posedge clk) disable iff (!rst_n) q_bar && s_req |=> q_bar);

endmodule
