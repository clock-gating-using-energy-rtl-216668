// tb_async_queue: the dual-clock queue with unrelated write and read clocks.
// Directed part: with the reader idle, fill the queue one word at a time and
// check F and AF against the fill level (AF from DEPTH-1 words, F at DEPTH),
// then check that a write into the full queue is refused and flagged. Random
// part: both sides active at random, every word read must be the next word
// accepted, in order; F must imply AF; a read is never offered from a truly
// empty queue.
module tb_async_queue;
  localparam int W = 16, D = 8;

  logic wclk = 0, rclk = 0, rst_n = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, afull, ovf, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] sb [$];
  int overflows = 0, reads = 0, writes = 0;

  async_queue #(.WIDTH(W), .DEPTH(D), .SYNC_STAGES(2)) dut (
    .wclk(wclk), .wsync_clk(wclk), .wrst_n(rst_n), .wr_en(wr_en), .wdata(wdata),
    .full(full), .afull(afull), .wr_refused(ovf),
    .rclk(rclk), .rrst_n(rst_n), .rd_en(rd_en), .rdata(rdata), .empty(empty));

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("t=%0t %s", $time, msg);
  endtask

  // Write side: accepted writes go to the scoreboard.
  always @(posedge wclk) begin
    if (wr_en && !full) begin sb.push_back(wdata); writes++; end
    checks++;
    if (full && !afull) fail("F without AF");
  end

  // Read side: check order.
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++;
      reads++;
      if (sb.size() == 0) fail("read from a queue that holds nothing");
      else if (rdata !== sb[0]) fail($sformatf("read %h want %h", rdata, sb[0]));
      if (sb.size() != 0) void'(sb.pop_front());
    end
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    // Directed fill with the reader idle.
    for (int k = 1; k <= D; k++) begin
      @(negedge wclk);
      wr_en = 1; wdata = W'(k);
      @(negedge wclk);
      wr_en = 0;
      checks += 2;
      if (afull !== (k >= D - 1)) fail($sformatf("AF=%0d after %0d words", afull, k));
      if (full  !== (k == D))     fail($sformatf("F=%0d after %0d words", full, k));
    end
    @(negedge wclk);
    wr_en = 1; wdata = 16'hdead;
    @(negedge wclk);
    wr_en = 0;
    checks++;
    if (!ovf) fail("write into a full queue not flagged");
    else overflows++;
    // Drain and check F/AF fall once the read pointer has crossed over.
    @(negedge rclk);
    rd_en = 1;
    repeat (3) @(negedge rclk);
    rd_en = 0;
    repeat (6) @(negedge wclk);
    checks++;
    if (full || afull) fail("F/AF still high after three reads");
    // Random traffic on both sides.
    fork
      for (int i = 0; i < 4000; i++) begin
        @(negedge wclk);
        wr_en = ($urandom_range(0, 3) != 0) && !full;
        wdata = W'($urandom);
      end
      for (int i = 0; i < 3000; i++) begin
        @(negedge rclk);
        rd_en = ($urandom_range(0, 2) != 0);
      end
    join
    wr_en = 0;
    @(negedge rclk);
    rd_en = 1;
    repeat (40) @(negedge rclk);
    rd_en = 0;
    checks++;
    if (sb.size() != 0) fail($sformatf("%0d words never came out", sb.size()));
    checks++;
    if (reads < 1000) fail("too few reads");
    $display("writes=%0d reads=%0d overflows=%0d", writes, reads, overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
