// axil_if: AXI4-Lite bundle with bus-master tasks, used by the testbenches to
// play the host processor. Signals change on the falling clock edge; a
// transfer happens on the rising edge where valid and ready are both high.
// The write task can delay the address, data or response handshakes by a
// number of cycles so that every ordering of the channels can be exercised.
interface axil_if #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 32
) (
  input logic clk
);

  logic [AW-1:0]   awaddr;
  logic [2:0]      awprot;
  logic            awvalid;
  logic            awready;
  logic [DW-1:0]   wdata;
  logic [DW/8-1:0] wstrb;
  logic            wvalid;
  logic            wready;
  logic [1:0]      bresp;
  logic            bvalid;
  logic            bready;
  logic [AW-1:0]   araddr;
  logic [2:0]      arprot;
  logic            arvalid;
  logic            arready;
  logic [DW-1:0]   rdata;
  logic [1:0]      rresp;
  logic            rvalid;
  logic            rready;

  int resp_errors = 0;

  task automatic idle();
    awaddr = '0; awprot = '0; awvalid = 1'b0;
    wdata = '0; wstrb = '1; wvalid = 1'b0; bready = 1'b0;
    araddr = '0; arprot = '0; arvalid = 1'b0; rready = 1'b0;
  endtask

  task automatic write(input logic [AW-1:0] addr, input logic [DW-1:0] data,
                       input int aw_delay = 0, input int w_delay = 0, input int b_delay = 0);
    bit aw_done, w_done, aw_acc, w_acc;
    int t;
    aw_done = 1'b0; w_done = 1'b0; t = 0;
    @(negedge clk);
    while (!(aw_done && w_done)) begin
      if (!aw_done && t >= aw_delay) begin awaddr = addr; awvalid = 1'b1; end
      if (!w_done  && t >= w_delay)  begin wdata = data; wvalid = 1'b1; end
      aw_acc = awvalid && awready;
      w_acc  = wvalid && wready;
      @(negedge clk);
      t++;
      // once accepted, the payload lines carry junk: the slave must have kept a copy
      if (aw_acc) begin awvalid = 1'b0; aw_done = 1'b1; awaddr = AW'($urandom); end
      if (w_acc)  begin wvalid = 1'b0;  w_done = 1'b1;  wdata = DW'($urandom); end
    end
    repeat (b_delay) @(negedge clk);
    bready = 1'b1;
    while (!bvalid) @(negedge clk);
    if (bresp != 2'b00) resp_errors++;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic read(input logic [AW-1:0] addr, output logic [DW-1:0] data,
                      input int r_delay = 0);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1;
    while (!arready) @(negedge clk);
    @(negedge clk);
    arvalid = 1'b0;
    araddr = AW'($urandom);
    repeat (r_delay) @(negedge clk);
    rready = 1'b1;
    while (!rvalid) @(negedge clk);
    data = rdata;
    if (rresp != 2'b00) resp_errors++;
    @(negedge clk);
    rready = 1'b0;
  endtask

endinterface
