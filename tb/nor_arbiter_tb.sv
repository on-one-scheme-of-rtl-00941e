// nor_arbiter_tb: self-checking testbench for the four-channel arbiter.
//
// Inputs change on the falling clock edge and outputs are compared on the
// falling edge too.  The expected grant comes from a reference model kept in
// this file: it delays the demands by SYNC_STAGES edges and applies the rule
// "holder keeps the grant while it demands, else the lowest-numbered waiting
// source gets it".  A directed part first checks the latency (grant appears
// SYNC_STAGES+1 rising edges after a demand), a hold against a competing
// demand, a direct hand-over on release, a simultaneous request and the
// return to the initial state; then random demand patterns run against the
// model.
module nor_arbiter_tb;
  localparam int unsigned N           = 4;
  localparam int unsigned SYNC_STAGES = 2;
  localparam int unsigned LAT         = SYNC_STAGES + 1;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] demand_n;
  logic [N-1:0] grant;

  int checks   = 0;
  int failures = 0;
  int n_handover = 0, n_tie = 0, n_blocked = 0;

  nor_arbiter #(.N(N), .SYNC_STAGES(SYNC_STAGES)) dut (.*);

  always #5 clk = ~clk;

  // Reference model.
  logic [N-1:0] hist[SYNC_STAGES];   // active-low demands seen at past edges
  logic [N-1:0] model_grant;

  function automatic logic [N-1:0] next_grant(logic [N-1:0] g, logic [N-1:0] req);
    if ((g & req) != '0) return g;
    for (int i = 0; i < N; i++) if (req[i]) return N'(1) << i;
    return '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SYNC_STAGES; s++) hist[s] <= '1;
      model_grant <= '0;
    end else begin
      logic [N-1:0] req;
      req = ~hist[SYNC_STAGES-1];
      if (model_grant != '0 && (model_grant & req) == '0 && req != '0) n_handover++;
      if ((model_grant & req) == '0 && $countones(req) > 1) n_tie++;
      if ((model_grant & req) != '0 && (req & ~model_grant) != '0) n_blocked++;
      model_grant <= next_grant(model_grant, req);
      hist[0] <= demand_n;
      for (int s = 1; s < SYNC_STAGES; s++) hist[s] <= hist[s-1];
    end
  end

  task automatic check_grant(logic [N-1:0] exp, string what);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL %s: grant=%b expected %b at %0t", what, grant, exp, $time);
    end
  endtask

  // Apply a demand pattern and wait n rising edges, then compare on negedge.
  task automatic step(logic [N-1:0] d, int n);
    demand_n = d;
    repeat (n) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    demand_n = '1;
    rst_n    = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_grant(4'b0000, "initial state");

    // Latency: S2 demands; nothing before LAT edges, grant at LAT.
    step(4'b1101, LAT - 1);
    check_grant(4'b0000, "before latency");
    step(4'b1101, 1);
    check_grant(4'b0010, "S2 granted after SYNC_STAGES+1 edges");
    // S3 and S1 demand too: S2 keeps it.
    step(4'b1000, 2 * LAT);
    check_grant(4'b0010, "S2 holds against S1,S3,S4");
    // S2 releases: lowest waiting (S1) takes over directly.
    step(4'b1010, LAT - 1);
    check_grant(4'b0010, "release not yet seen");
    step(4'b1010, 1);
    check_grant(4'b0001, "hand-over to S1");
    // S1 releases, S3 and S4 wait: S3.
    step(4'b0011, LAT);
    check_grant(4'b0100, "hand-over to S3");
    // Everyone releases: initial state.
    step(4'b1111, LAT);
    check_grant(4'b0000, "back to initial state");
    // Simultaneous requests from S2 and S4 in the initial state.
    step(4'b0101, LAT);
    check_grant(4'b0010, "simultaneous S2,S4");
    step(4'b1111, LAT);
    check_grant(4'b0000, "idle again");

    // Random part against the model.
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) demand_n = N'($urandom);
      checks++;
      if (grant !== model_grant) begin
        failures++;
        $display("FAIL random: grant=%b model=%b at %0t", grant, model_grant, $time);
      end
      if ($countones(grant) > 1) begin
        failures++;
        $display("FAIL two grants at once: %b", grant);
      end
    end

    checks++;
    if (n_handover == 0 || n_tie == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL coverage: handover=%0d tie=%0d blocked=%0d", n_handover, n_tie, n_blocked);
    end
    $display("handovers=%0d simultaneous=%0d blocked=%0d", n_handover, n_tie, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
