// tb_mg_ec_nv: checks the phase-pipelined non-volatile MG-EC.
//
// Random operand sets are offered whenever in_ready is high. Each result must
// appear exactly two edges after its set was taken, and must equal the count
// of input ones (sum + 2*(carry + cout)), with cout following {3,4,5}. A burst
// phase offers a set at every opportunity and checks the rate of one set per
// two edges. A hold phase drops en for 40 cycles while the operand inputs keep
// changing and checks that nothing computes and every output holds, then
// resumes and checks the next result.
module tb_mg_ec_nv;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic in_ready, out_valid, sum, carry, cout, cin;
  logic [3:0] x;

  mg_ec_nv dut (
    .clk(clk), .rst_n(rst_n), .en(en), .in_valid(in_valid), .in_ready(in_ready),
    .x(x), .cin(cin), .out_valid(out_valid), .sum(sum), .carry(carry), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_n = 0;
  int due_q[$];
  int n_q[$];
  int accepted = 0, results = 0;

  // Count edges, and check results that are due on this edge.
  always @(posedge clk) begin
    bit take;
    int n;
    take = rst_n && en && in_valid && in_ready;
    n    = $countones({x, cin});
    edge_n++;
    #1;
    if (due_q.size() > 0 && due_q[0] == edge_n) begin
      checks++;
      if (!out_valid || int'(sum) + 2 * (int'(carry) + int'(cout)) != n_q[0]
          || cout != (n_q[0] >= 3)) begin
        failures++;
        $display("FAIL edge %0d: valid=%b sum=%b carry=%b cout=%b, expected %0d ones",
                 edge_n, out_valid, sum, carry, cout, n_q[0]);
      end
      void'(due_q.pop_front());
      void'(n_q.pop_front());
      results++;
    end
    if (take) begin
      due_q.push_back(edge_n + 2);
      n_q.push_back(n);
      accepted++;
    end
  end

  initial begin
    int a0, e0;
    logic s_h, c_h, co_h, v_h;
    x = '0;
    cin = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    // random offers
    repeat (200) begin
      @(negedge clk);
      in_valid = in_ready && ($urandom_range(0, 2) != 0);
      {x, cin} = 5'($urandom);
    end
    // burst: offer at every opportunity
    @(negedge clk);
    a0 = accepted;
    e0 = edge_n;
    repeat (100) begin
      in_valid = in_ready;
      {x, cin} = 5'($urandom);
      @(negedge clk);
    end
    checks++;
    if ((accepted - a0) != (edge_n - e0) / 2) begin
      failures++;
      $display("FAIL burst rate: %0d sets in %0d edges", accepted - a0, edge_n - e0);
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    // hold: compute clock gated, inputs keep moving
    s_h = sum; c_h = carry; co_h = cout; v_h = out_valid;
    en = 1'b0;
    repeat (40) begin
      {x, cin} = 5'($urandom);
      @(negedge clk);
      checks++;
      if (sum !== s_h || carry !== c_h || cout !== co_h || out_valid !== v_h || in_ready) begin
        failures++;
        $display("FAIL state changed while en was low");
      end
    end
    en = 1'b1;
    @(negedge clk);
    if (!in_ready) @(negedge clk);
    in_valid = 1'b1;
    {x, cin} = 5'b11111;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (due_q.size() != 0 || results != accepted || accepted < 60) begin
      failures++;
      $display("FAIL %0d accepted, %0d results, %0d pending", accepted, results, due_q.size());
    end
    $display("accepted %0d sets, %0d results", accepted, results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
