// tb_gja_bus_if: self-checking testbench of gja_bus_if.
//
// The core side is a behavioural stand-in: an N x (N+1) array answering the
// host port, and busy/done/singular driven by the testbench. Checks the
// matrix window (address decoding, one-cycle read latency, dropped writes
// outside the matrix or while busy), the start strobe and its qualifiers, the
// sticky done flag, and the status and information registers.
module tb_gja_bus_if;
  localparam int unsigned N  = 9;
  localparam int unsigned M  = 16;
  localparam int unsigned C  = N + 1;
  localparam int unsigned RW = 4, CW = 4, AW = 9;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] address = '0;
  logic read = 0, write = 0;
  logic [31:0] writedata = '0, readdata;
  logic core_start, core_busy = 0, core_done = 0, core_singular = 0;
  logic host_we;
  logic [RW-1:0] host_row;
  logic [CW-1:0] host_col;
  logic [M-1:0] host_wdata, host_rdata;
  logic [M-1:0] mem [16][16];
  int checks = 0, failures = 0, starts = 0;

  always #5 clk = ~clk;

  gja_bus_if dut (.clk(clk), .rst_n(rst_n), .avs_address(address), .avs_read(read),
                  .avs_write(write), .avs_writedata(writedata), .avs_readdata(readdata),
                  .core_start(core_start), .core_busy(core_busy), .core_done(core_done),
                  .core_singular(core_singular), .host_we(host_we), .host_row(host_row),
                  .host_col(host_col), .host_wdata(host_wdata), .host_rdata(host_rdata));

  assign host_rdata = mem[host_row][host_col];
  always @(posedge clk) begin
    if (host_we) mem[host_row][host_col] <= host_wdata;
    if (core_start) starts++;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bus_write(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic bus_read(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; read = 1;
    @(negedge clk);
    read = 0;
    d = readdata;    // registered: valid one cycle after the request
  endtask

  function automatic logic [AW-1:0] mat_addr(int r, int c);
    return {1'b1, RW'(r), CW'(c)};
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int s0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) mem[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    bus_read(9'h001, d);
    check("info", d, {16'd16, 16'd9});
    bus_read(9'h000, d);
    check("status after reset", d, 0);

    // write every element with a pattern, read it back through the bus
    for (int r = 0; r < N; r++)
      for (int c = 0; c < C; c++) bus_write(mat_addr(r, c), 32'hABCD0000 | (r * 16 + c));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < C; c++) begin
        check("stored", 32'(mem[r][c]), r * 16 + c);
        bus_read(mat_addr(r, c), d);
        check("readback", d, r * 16 + c);
      end

    // outside the matrix: dropped, read as zero
    bus_write(mat_addr(9, 0), 32'h1234);
    check("row 9 dropped", 32'(mem[9][0]), 0);
    bus_write(mat_addr(0, 10), 32'h1234);
    check("col 10 dropped", 32'(mem[0][10]), 0);
    mem[12][3] = 16'h5555;
    bus_read(mat_addr(12, 3), d);
    check("out of range read", d, 0);

    // start strobe
    s0 = starts;
    bus_write(9'h000, 32'h0);
    check("bit0 clear: no start", starts - s0, 0);
    bus_write(9'h001, 32'h1);
    check("info write: no start", starts - s0, 0);
    bus_write(9'h000, 32'h1);
    check("start", starts - s0, 1);

    // busy: status shows it, writes and starts are dropped
    core_busy = 1;
    bus_read(9'h000, d);
    check("status busy", d, 32'b001);
    bus_write(mat_addr(2, 2), 32'hFFFF);
    check("write while busy dropped", 32'(mem[2][2]), 2 * 16 + 2);
    s0 = starts;
    bus_write(9'h000, 32'h1);
    check("start while busy dropped", starts - s0, 0);

    // done pulse with singular, flag sticks after busy falls
    @(negedge clk);
    core_done = 1; core_singular = 1;
    @(negedge clk);
    core_done = 0; core_busy = 0;
    bus_read(9'h000, d);
    check("status done+singular", d, 32'b110);
    bus_read(9'h000, d);
    check("done sticky", d, 32'b110);
    core_singular = 0;
    bus_write(9'h000, 32'h1);
    bus_read(9'h000, d);
    check("done cleared by start", d, 32'b000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
