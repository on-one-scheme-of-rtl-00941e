// nor_ring_compare_tb: checks that the clocked nor_arbiter grants the same
// source as the asynchronous OR-NO ring it stands for.
//
// Both are driven with the same active-low demand patterns.  Each pattern is
// held for 2*(SYNC_STAGES+1) clock cycles, long enough for the ring to
// settle and for the clocked arbiter to see the change, and the two grants
// are then compared.  The ring's gate delays rise with the element number,
// so its fastest element is the lowest-numbered one, the same order the
// clocked arbiter uses for simultaneous requests.  The patterns include
// simultaneous requests from the idle state, holds against new demands and
// releases with several demands waiting; the count of each is checked to be
// non-zero.
module nor_ring_compare_tb;
  localparam int unsigned N           = 4;
  localparam int unsigned SYNC_STAGES = 2;
  localparam int unsigned HOLD        = 2 * (SYNC_STAGES + 1);

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] demand_n;
  logic [N-1:0] grant_clk, grant_ring;

  int checks = 0, failures = 0;
  int n_tie = 0, n_hold = 0, n_handover = 0;

  nor_arbiter #(.N(N), .SYNC_STAGES(SYNC_STAGES)) u_clk (
      .clk(clk), .rst_n(rst_n), .demand_n(demand_n), .grant(grant_clk));

  nor_ring_model #(.N(N), .DELAY('{1, 2, 3, 4})) u_ring (
      .demand_n(demand_n), .grant(grant_ring));

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] prev_grant, d;
    demand_n = '1;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (HOLD) @(negedge clk);
    for (int k = 0; k < 1500; k++) begin
      prev_grant = grant_clk;
      d = N'($urandom);
      if (prev_grant == '0 && $countones(~d) > 1) n_tie++;
      if ((prev_grant & ~d) != '0 && (~d & ~prev_grant) != '0) n_hold++;
      if (prev_grant != '0 && (prev_grant & ~d) == '0 && $countones(~d) > 1) n_handover++;
      demand_n = d;
      repeat (HOLD) @(negedge clk);
      checks++;
      if (grant_clk !== grant_ring || $countones(grant_ring) > 1) begin
        failures++;
        $display("FAIL demand_n=%b: clocked grant=%b ring grant=%b", d, grant_clk, grant_ring);
      end
    end
    checks++;
    if (n_tie == 0 || n_hold == 0 || n_handover == 0) begin
      failures++;
      $display("FAIL coverage tie=%0d hold=%0d handover=%0d", n_tie, n_hold, n_handover);
    end
    $display("simultaneous=%0d holds=%0d handovers=%0d", n_tie, n_hold, n_handover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
