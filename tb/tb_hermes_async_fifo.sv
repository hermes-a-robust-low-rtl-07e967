// tb_hermes_async_fifo: self-checking test of the dual-clock Tx FIFO.
// Writer (7 ns clock) and reader (5 ns clock) run with random enables; every
// word read must equal the next word written, nothing may be lost, the FIFO
// must report full when the reader stops, and must flag a write attempted while full.
`timescale 1ns/1ps
module tb_hermes_async_fifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic we = 0, rd_en = 0;
  logic [71:0] wdata = '0, rdata;
  logic full, empty, overflow;
  int checks = 0, failures = 0;
  logic [71:0] q[$];
  int nwr = 0, nrd = 0;
  bit stop_reader = 0, saw_full = 0, wrote_full = 0;

  hermes_async_fifo #(.WIDTH(72), .DEPTH(16)) dut (.*);

  always #3.5 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  initial begin
    repeat (100000) @(posedge rclk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk); wrst <= 0;
    while (nwr < 3000) begin
      @(posedge wclk);
      if (we && !full) begin q.push_back(wdata); nwr++; end
      if (full) saw_full = 1;
      if (we && full) wrote_full = 1;
      we    <= ($urandom % 4) != 0;
      wdata <= {8'($urandom), $urandom, $urandom};
    end
    we <= 0;
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk); rrst <= 0;
    forever begin
      @(posedge rclk);
      if (rd_en && !empty) begin
        checks++;
        if (q.size() == 0 || rdata != q.pop_front()) begin
          failures++; $display("FAIL: data mismatch at word %0d", nrd);
        end
        nrd++;
      end
      rd_en <= stop_reader ? 1'b0 : (($urandom % 3) != 0);
    end
  end

  initial begin
    #2000 stop_reader = 1;
    #600  stop_reader = 0;
    wait (nwr == 3000);
    repeat (50) @(posedge rclk);
    checks++; if (nrd != 3000) begin failures++; $display("FAIL: read %0d words", nrd); end
    checks++; if (!empty) begin failures++; $display("FAIL: not empty at end"); end
    checks++; if (overflow != wrote_full) begin failures++; $display("FAIL: overflow flag %0d, write into full FIFO %0d", overflow, wrote_full); end
    checks++; if (!saw_full) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
