// nor_ring_model: behavioural, gate-level model of the asynchronous
// arbiter that nor_arbiter realizes with a clock.  Not synthesizable in
// intent: it is a ring of combinational feedback whose behaviour depends on
// gate delays, and it is used only by testbenches.
//
// Element i is an OR-NO (NOR) gate whose inputs are demand_n[i] and the
// outputs of all other elements, with a propagation delay of DELAY[i] time
// units.  With every demand at 1 all outputs settle to 0.  A demand at 0
// drives its element's output to 1, which holds every other output at 0.
// When several demands meet an idle ring, the element with the smallest
// delay rises first and wins the race; the continuous-assignment delays are
// inertial, so the slower elements' pending rises are cancelled.
module nor_ring_model #(
    parameter int unsigned N        = 4,
    parameter int unsigned DELAY[N] = '{1, 2, 3, 4}
) (
    input  logic [N-1:0] demand_n,
    output logic [N-1:0] grant
);

  for (genvar i = 0; i < N; i++) begin : g_element
    logic [N-1:0] others;
    always_comb begin
      others    = grant;
      others[i] = 1'b0;
    end
    assign #(DELAY[i]) grant[i] = ~(demand_n[i] | (|others));
  end

endmodule
