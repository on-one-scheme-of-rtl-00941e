// rs_arbiter_tb: self-checking testbench for the two-channel RS flip-flop
// arbiter.
//
// The directed part walks through the sequence of the scheme's timing
// diagram: R falls (Q rises); S pulses low and high while R is held (no
// effect); R rises while S is low (Q falls, Qbar rises on the same edge);
// R pulses while S is held (no effect); S rises (Qbar falls).  Each change is
// checked both one edge before and exactly SYNC_STAGES+1 edges after it is
// applied.  A simultaneous fall of R and S and random patterns checked
// against a reference model follow.
module rs_arbiter_tb;
  localparam int unsigned SYNC_STAGES = 2;
  localparam int unsigned LAT         = SYNC_STAGES + 1;

  logic clk = 1'b0;
  logic rst_n, r_n, s_n, q, q_bar;

  int checks = 0, failures = 0;

  rs_arbiter #(.SYNC_STAGES(SYNC_STAGES)) dut (.*);

  always #5 clk = ~clk;

  // Reference model: demands delayed SYNC_STAGES edges, then the RS rule.
  logic [1:0] hist[SYNC_STAGES];   // {s_n, r_n}
  logic       m_q, m_qb;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SYNC_STAGES; s++) hist[s] <= 2'b11;
      m_q  <= 1'b0;
      m_qb <= 1'b0;
    end else begin
      logic rr, sr;
      rr = ~hist[SYNC_STAGES-1][0];
      sr = ~hist[SYNC_STAGES-1][1];
      if (m_q && rr)       begin m_q <= 1'b1; m_qb <= 1'b0; end
      else if (m_qb && sr) begin m_q <= 1'b0; m_qb <= 1'b1; end
      else                 begin m_q <= rr;   m_qb <= sr && !rr; end
      hist[0] <= {s_n, r_n};
      for (int s = 1; s < SYNC_STAGES; s++) hist[s] <= hist[s-1];
    end
  end

  task automatic expect_out(logic eq, logic eqb, string what);
    checks++;
    if (q !== eq || q_bar !== eqb) begin
      failures++;
      $display("FAIL %s: Q=%b Qbar=%b expected %b %b at %0t", what, q, q_bar, eq, eqb, $time);
    end
  endtask

  // Apply R,S; check the old outputs one edge before the latency ends and
  // the new ones when it ends.
  task automatic apply(logic r, logic s, logic oq, logic oqb, logic nq, logic nqb, string what);
    r_n = r;
    s_n = s;
    repeat (LAT - 1) @(posedge clk);
    @(negedge clk);
    expect_out(oq, oqb, {what, " (before)"});
    @(posedge clk);
    @(negedge clk);
    expect_out(nq, nqb, what);
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_n = 1'b1;
    s_n = 1'b1;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_out(1'b0, 1'b0, "initial state");

    apply(1'b0, 1'b1, 0, 0, 1, 0, "R falls: Q rises");
    apply(1'b0, 1'b0, 1, 0, 1, 0, "S falls while Q held");
    apply(1'b0, 1'b1, 1, 0, 1, 0, "S rises while Q held");
    apply(1'b0, 1'b0, 1, 0, 1, 0, "S falls again");
    apply(1'b1, 1'b0, 1, 0, 0, 1, "R rises: hand-over to Qbar");
    apply(1'b0, 1'b0, 0, 1, 0, 1, "R falls while Qbar held");
    apply(1'b1, 1'b0, 0, 1, 0, 1, "R rises while Qbar held");
    apply(1'b1, 1'b1, 0, 1, 0, 0, "S rises: initial state");
    apply(1'b0, 1'b0, 0, 0, 1, 0, "simultaneous fall");
    apply(1'b1, 1'b1, 1, 0, 0, 0, "both release");
    apply(1'b1, 1'b0, 0, 0, 0, 1, "S alone");
    apply(1'b1, 1'b1, 0, 1, 0, 0, "S releases");

    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) {s_n, r_n} = 2'($urandom);
      expect_out(m_q, m_qb, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
