// tb_axil_slave: checks the AXI4-Lite slave with a bus-master model.
// Writes with the address first, the data first, both together and with a
// slow response handshake must each produce exactly one wr_en strobe with the
// right address and data and an OKAY response; reads, also with a slow
// R handshake, must produce exactly one rd_en strobe and return the register
// value that was presented in the strobe cycle.
module tb_axil_slave;
  localparam int AW = 8;
  localparam int DW = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  axil_if #(.AW(AW), .DW(DW)) bus (.clk);

  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;

  axil_slave #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk, .rst_n,
    .s_awaddr(bus.awaddr), .s_awprot(bus.awprot), .s_awvalid(bus.awvalid), .s_awready(bus.awready),
    .s_wdata(bus.wdata), .s_wstrb(bus.wstrb), .s_wvalid(bus.wvalid), .s_wready(bus.wready),
    .s_bresp(bus.bresp), .s_bvalid(bus.bvalid), .s_bready(bus.bready),
    .s_araddr(bus.araddr), .s_arprot(bus.arprot), .s_arvalid(bus.arvalid), .s_arready(bus.arready),
    .s_rdata(bus.rdata), .s_rresp(bus.rresp), .s_rvalid(bus.rvalid), .s_rready(bus.rready),
    .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  // Register file model behind the slave: reads return a value derived from
  // the address and a counter that changes every cycle, so a late capture
  // would be seen.
  int unsigned tick = 0;
  always_ff @(posedge clk) tick <= tick + 1;
  assign rd_data = {tick[23:0], rd_addr};

  int wr_count = 0, rd_count = 0;
  logic [AW-1:0] last_wa;
  logic [DW-1:0] last_wd;
  logic [DW-1:0] rd_expect;
  always_ff @(posedge clk) begin
    if (wr_en) begin wr_count <= wr_count + 1; last_wa <= wr_addr; last_wd <= wr_data; end
    if (rd_en) begin rd_count <= rd_count + 1; rd_expect <= rd_data; end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic do_write(logic [AW-1:0] a, logic [DW-1:0] d, int awd, int wd, int bd);
    int c0;
    c0 = wr_count;
    bus.write(a, d, awd, wd, bd);
    check("one strobe per write", wr_count - c0, 1);
    check("write address", last_wa, a);
    check("write data", last_wd, d);
  endtask

  task automatic do_read(logic [AW-1:0] a, int rd);
    int c0;
    logic [DW-1:0] d;
    c0 = rd_count;
    bus.read(a, d, rd);
    check("one strobe per read", rd_count - c0, 1);
    check("read data", d, rd_expect);
    check("read address", d[AW-1:0], a);
  endtask

  initial begin
    bus.idle();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do_write(8'h04, 32'h1234_5678, 0, 0, 0);
    do_write(8'h10, 32'hDEAD_BEEF, 0, 3, 0);   // address first
    do_write(8'h14, 32'h0BAD_F00D, 4, 0, 0);   // data first
    do_write(8'h18, 32'h0000_0002, 0, 0, 5);   // slow response
    for (int i = 0; i < 20; i++)
      do_write(AW'($urandom), $urandom, $urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 2));
    do_read(8'h08, 0);
    do_read(8'h0C, 4);                          // slow R handshake
    for (int i = 0; i < 20; i++) do_read(AW'($urandom), $urandom_range(0, 3));
    check("response errors", longint'(bus.resp_errors), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
