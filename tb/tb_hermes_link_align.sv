// tb_hermes_link_align: self-checking test of channel bonding.
// Four channels receive markers at random skews of up to 31 cycles, the first
// group arriving right after `start` (must be skipped: the block waits for a
// quiet gap) and the second 70 cycles later (must be used). The
// correction for each channel must be the number of cycles from its marker to
// the last marker. The testbench then models each channel as a delay line whose
// delay grows by the correction and checks that the next markers coincide. A
// skew beyond MAX_SKEW must end in align_err. A channel that stops delivering
// words (chan_ok low for one cycle) must clear `aligned`.
`timescale 1ns/1ps
module tb_hermes_link_align;
  localparam int NCH = 4;
  logic clk = 0, rst = 1, start = 0;
  logic [NCH-1:0] marker = '0;
  logic [NCH-1:0] chan_ok = '1;
  logic adj_valid, aligned, align_err, busy;
  logic [NCH-1:0][7:0] adj;
  int checks = 0, failures = 0;

  hermes_link_align #(.NCH(NCH), .MAX_SKEW(31)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat[NCH], mx;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int it = 0; it < 20; it++) begin
      int t, got_adj[NCH];
      mx = 0;
      for (int i = 0; i < NCH; i++) begin lat[i] = $urandom % 32; if (lat[i] > mx) mx = lat[i]; end
      start = 1; @(posedge clk); #1 start = 0;
      // markers sent at t=-10 and t=60 on all channels, seen at t+lat[i]
      t = 0;
      while (t < 60 + mx + 3) begin
        for (int i = 0; i < NCH; i++) marker[i] = (t == 60 + lat[i]) || (t + 10 == lat[i]);
        @(posedge clk); #1;
        marker = '0;
        if (adj_valid) for (int i = 0; i < NCH; i++) got_adj[i] = int'(adj[i]);
        t++;
      end
      check(aligned && !busy, "aligned");
      for (int i = 0; i < NCH; i++)
        check(got_adj[i] == mx - lat[i], $sformatf("ch%0d adj %0d exp %0d", i, got_adj[i], mx - lat[i]));
      // delays after correction are equal
      for (int i = 1; i < NCH; i++)
        check(lat[i] + got_adj[i] == lat[0] + got_adj[0], "markers coincide after correction");
      if (it % 5 == 4) begin
        chan_ok[it % NCH] = 1'b0; @(posedge clk); #1 chan_ok = '1;
        check(!aligned, "aligned cleared when a channel stops");
      end
    end
    // too much skew
    start = 1; @(posedge clk); #1 start = 0;
    repeat (40) @(posedge clk); #1;
    marker = 4'b0111; @(posedge clk); #1 marker = '0;
    repeat (40) @(posedge clk); #1;
    check(align_err && !aligned, "skew beyond MAX_SKEW flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
