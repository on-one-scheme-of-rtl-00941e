// nor_arbiter: N-channel arbiter that lets exactly one of N independent
// sources work with a shared receiver at a time.
//
// The scheme it realizes is a ring of N OR-NO (NOR) elements: element i takes
// source i's active-low DEMAND line and the outputs of all other elements.
// When a source pulls its demand to 0 and no other output is 1, its element's
// output rises to 1, which opens that source's channel and at the same time
// holds every other element's output at 0.  The source keeps the receiver for
// as long as its demand stays 0, whatever the others do.  When it releases
// (demand back to 1) the grant falls, and if other demands are waiting exactly
// one of them takes over; with no demand waiting all outputs return to 0.
//
// Clocked realization.  The NOR ring is an asynchronous circuit whose
// simultaneous-request race is decided by the spread in gate delays.  Here
// the same state is held in N flip-flops (`grant`) updated on each clock
// edge:
//   * if the current holder still demands, the grant is kept;
//   * otherwise the grant goes to the lowest-numbered demanding source, or to
//     nobody.
// The fixed lowest-index-wins choice stands in for the "fastest gate wins"
// race of the asynchronous circuit; it is this design's choice.  A release and
// a new grant happen on the same edge, so the grant hands over directly from
// one source to the next with never two grants at once.
//
// Interface: demand_n[i] is DEMAND(i+1), active low, asynchronous to clk; it
// passes a SYNC_STAGES-deep synchronizer.  grant[i] = 1 opens channel i (it is
// also that source's READY line).  Timing: a demand or release stable at the
// input is seen by `grant` SYNC_STAGES+1 rising edges later.  Reset
// (asynchronous, active low) gives the initial state: no grant.
module nor_arbiter #(
    parameter int unsigned N           = 4,
    parameter int unsigned SYNC_STAGES = 2
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic [N-1:0] demand_n,
    output logic [N-1:0] grant
);

  logic [N-1:0] dem_s_n;   // synchronized demands, active low
  logic [N-1:0] request;   // synchronized demands, active high
  logic [N-1:0] grant_d;
  logic         holder_stays;

  demand_sync #(.N(N), .SYNC_STAGES(SYNC_STAGES)) u_sync (
      .clk          (clk),
      .rst_n        (rst_n),
      .demand_n     (demand_n),
      .demand_sync_n(dem_s_n)
  );

  assign request      = ~dem_s_n;
  assign holder_stays = |(grant & request);

  always_comb begin
    grant_d = '0;
    if (holder_stays) begin
      grant_d = grant;
    end else begin
      for (int i = N - 1; i >= 0; i--) begin
        if (request[i]) grant_d = N'(1) << i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grant <= '0;
    else        grant <= grant_d;
  end

  // At most one channel is open at any time.
  a_mutex : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  // A source that holds the grant keeps it while it still demands.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      (grant & request) != '0 |=> grant == $past(grant));
  // A grant is only ever given to a demanding source.
  a_granted_demands : assert property (@(posedge clk) disable iff (!rst_n)
      ((grant & ~$past(request)) == '0));

endmodule
