// Testbench for deleg_router at node (2,2): messages of ten 9-bit flits are
// routed X first then Y (east, west, north, south, local), arrive intact and
// in order, leave before their tail has arrived (cut-through), and the
// 180-bit buffer takes at most two messages while the outputs are blocked.
module tb_deleg_router;
  localparam int NP = 5, FL = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] my_x = 2, my_y = 2;
  logic [NP-1:0] in_valid = 0, in_ready, out_valid, out_ready = '1;
  logic [8:0] in_flit [NP], out_flit [NP];
  logic [15:0] n_forwarded;
  initial for (int p = 0; p < NP; p++) in_flit[p] = 0;

  deleg_router dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive log per output
  logic [8:0] rx [NP][$];
  int first_out_cycle, cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < NP; p++)
      if (rst_n && out_valid[p] && out_ready[p]) begin
        rx[p].push_back(out_flit[p]);
      end
  end

  task automatic send(input int port, input logic [3:0] dx, input logic [3:0] dy,
                      input logic [7:0] seed, input int gap);
    for (int f = 0; f < FL; f++) begin
      @(negedge clk);
      in_valid[port] = 1;
      in_flit[port] = (f == 0) ? {1'b0, dy, dx} : {1'b1, seed + 8'(f)};
      #1;
      while (!in_ready[port]) begin @(negedge clk); #1; end
      @(negedge clk);
      in_valid[port] = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic expect_msg(input int port, input logic [3:0] dx, input logic [3:0] dy,
                            input logic [7:0] seed, input string what);
    bit ok;
    ok = rx[port].size() >= FL;
    if (ok) begin
      ok = (rx[port][0] == {1'b0, dy, dx});
      for (int f = 1; f < FL; f++) ok &= (rx[port][f] == {1'b1, seed + 8'(f)});
      for (int f = 0; f < FL; f++) void'(rx[port].pop_front());
    end
    chk(ok, what);
  endtask

  initial begin
    cyc = 0;
    repeat (2) @(posedge clk); rst_n <= 1;
    send(0, 4, 2, 8'h10, 0); repeat (15) @(negedge clk);
    expect_msg(2, 4, 2, 8'h10, "east");
    send(3, 0, 2, 8'h20, 0); repeat (15) @(negedge clk);
    expect_msg(4, 0, 2, 8'h20, "west");
    send(4, 2, 5, 8'h30, 0); repeat (15) @(negedge clk);
    expect_msg(1, 2, 5, 8'h30, "north");
    send(0, 2, 0, 8'h40, 0); repeat (15) @(negedge clk);
    expect_msg(3, 2, 0, 8'h40, "south");
    send(1, 2, 2, 8'h50, 0); repeat (15) @(negedge clk);
    expect_msg(0, 2, 2, 8'h50, "local");
    send(2, 3, 7, 8'h60, 0); repeat (15) @(negedge clk);
    expect_msg(2, 3, 7, 8'h60, "x before y");
    // cut-through: slow injection, the head leaves before the tail arrives
    fork
      send(0, 4, 2, 8'h70, 3);
      begin
        @(negedge clk);
        while (rx[2].size() == 0) @(negedge clk);
        chk(in_valid[0] || dut.busy_q[0] || dut.busy_q[1], "head out while message in transit");
        chk(rx[2].size() < FL, "head left before tail arrived");
      end
    join
    repeat (15) @(negedge clk);
    expect_msg(2, 4, 2, 8'h70, "cut-through message intact");
    // buffer capacity: block east, offer three messages from three inputs
    out_ready[2] = 0;
    fork
      send(0, 5, 2, 8'h80, 0);
      send(1, 5, 2, 8'h90, 0);
      begin
        repeat (3) @(negedge clk);
        in_valid[4] = 1; in_flit[4] = {1'b0, 4'd2, 4'd5};
        repeat (30) @(negedge clk);
        chk(!in_ready[4], "third message refused: buffer holds two");
      end
    join
    chk(dut.busy_q[0] && dut.busy_q[1], "both slots hold a message");
    out_ready[2] = 1;
    repeat (40) @(negedge clk);
    chk(in_ready[4] || rx[2].size() >= 2 * FL, "third accepted after drain");
    in_valid[4] = 0;
    chk(rx[2].size() >= 2 * FL, "two messages out");
    // nine messages plus the third one, whose header flit stayed offered
    chk(n_forwarded == 10, $sformatf("forwarded count %0d", n_forwarded));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
