// tb_cache_tags: 64 KB, 4-way, 64-byte-line tag store. Checks cold misses,
// hits within a line, LRU replacement among five lines of one set, that two
// ports missing on the same line in one cycle count one miss, and that the
// perfect-memory mode never misses.
module tb_cache_tags;
  logic clk = 0, rst_n = 0, perfect = 0;
  logic [1:0] req, miss; logic [1:0][31:0] addr;
  int checks = 0, failures = 0;
  cache_tags #(.SIZE_BYTES(65536), .WAYS(4), .LINE_BYTES(64), .NPORTS(2)) dut (.*);
  always #5 clk = ~clk;
  localparam int SETSTRIDE = 65536 / 4;   // bytes between lines of the same set

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic [31:0] a, logic exp_miss);
    @(negedge clk);
    req = 2'b01; addr[0] = a; addr[1] = 0;
    #1;
    checks++;
    if (miss[0] !== exp_miss) begin
      failures++;
      $display("FAIL addr=%h miss=%b exp=%b", a, miss[0], exp_miss);
    end
    @(posedge clk);
    #1 req = 0;
  endtask

  initial begin
    req = 0; addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    access(32'h100, 1);
    access(32'h13C, 0);                 // same line
    access(32'h140, 1);                 // next line
    // set of address 0x1000: lines A..E
    for (int i = 0; i < 4; i++) access(32'h1000 + i * SETSTRIDE, 1);
    for (int i = 0; i < 4; i++) access(32'h1000 + i * SETSTRIDE, 0);
    access(32'h1000, 0);                        // A most recent, B now LRU
    access(32'h1000 + 4 * SETSTRIDE, 1);        // E evicts B
    access(32'h1000, 0);
    access(32'h1000 + 2 * SETSTRIDE, 0);
    access(32'h1000 + 1 * SETSTRIDE, 1);        // B was evicted
    // two ports, same new line, same cycle
    @(negedge clk);
    req = 2'b11; addr[0] = 32'h8000; addr[1] = 32'h8004;
    #1;
    checks++;
    if (miss !== 2'b01) failures++;
    @(posedge clk);
    #1 req = 0;
    access(32'h8008, 0);
    // perfect memory
    perfect = 1;
    for (int i = 0; i < 20; i++) access(32'h40000 + i * 4096, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
