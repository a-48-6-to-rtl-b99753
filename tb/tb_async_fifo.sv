// Self-checking testbench of the dual-clock FIFO. The write clock is slower
// than the read clock by a non-integer ratio. Phase 1 fills the FIFO with
// the reader stopped and checks that exactly DEPTH words are taken, wready
// drops and wlevel reads DEPTH. Phase 2 drains it while writing more, both
// sides with random stalls. Every word read is compared, in order, with a
// scoreboard queue; at the end the FIFO must be empty.
module tb_async_fifo;
  localparam int DEPTH = 1024;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #17 wclk = ~wclk;
  always #5  rclk = ~rclk;
  logic wvalid, wready, rvalid, rready;
  logic [18:0] wdata, rdata;
  logic [10:0] wlevel;
  int checks = 0, failures = 0;
  logic [18:0] sb [$];
  int written = 0, readn = 0;
  bit reader_on = 0, writer_done = 0;

  async_fifo dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wvalid = 0; wdata = 0;
    #100 wrst_n = 1;
    @(negedge wclk);
    // phase 1: fill until full
    while (1) begin
      wvalid = 1; wdata = 19'($urandom);
      @(posedge wclk);
      if (wready) begin sb.push_back(wdata); written++; end
      @(negedge wclk);
      if (!wready) break;
    end
    wvalid = 0;
    checks++;
    if (written != DEPTH || wlevel != 11'(DEPTH)) begin
      failures++; $display("FAIL full after %0d writes, level %0d", written, wlevel);
    end
    reader_on = 1;
    // phase 2: random writes while the reader drains
    repeat (3000) begin
      wvalid = 1'($urandom % 2); wdata = 19'($urandom);
      @(posedge wclk);
      if (wvalid && wready) begin sb.push_back(wdata); written++; end
      @(negedge wclk);
    end
    wvalid = 0;
    writer_done = 1;
  end

  // reader
  initial begin
    rready = 0;
    #100 rrst_n = 1;
    wait (reader_on);
    @(negedge rclk);
    forever begin
      rready = 1'($urandom % 4 != 0);
      if (rvalid && rready) begin
        checks++;
        if (sb.size() == 0 || rdata != sb[0]) begin
          failures++; $display("FAIL read %0d got %h", readn, rdata);
        end
        if (sb.size() != 0) void'(sb.pop_front());
        readn++;
      end
      @(negedge rclk);
      if (writer_done && sb.size() == 0) break;
    end
    rready = 0;
    repeat (10) @(negedge rclk);
    checks++;
    if (rvalid) begin failures++; $display("FAIL not empty at end"); end
    $display("%0d written, %0d read", written, readn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
