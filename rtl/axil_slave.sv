// axil_slave: AXI4-Lite slave front end for the accelerator's registers.
//
// Turns AXI4-Lite transactions into single-cycle register strobes. The write
// address and write data channels are accepted independently (each is held
// in a small buffer until its partner arrives); when both are present and no
// write response is outstanding, `wr_en` pulses for one cycle with `wr_addr`
// and `wr_data`, and an OKAY response is raised on B until the master takes
// it. A read address is accepted when no read response is outstanding; in
// that cycle `rd_en` pulses with `rd_addr`, the register value on `rd_data` is
// captured, and it is returned with OKAY on R until the master takes it. A
// register with a side effect on read (read-to-clear) therefore sees exactly
// one `rd_en` per transaction. Write strobes are ignored: every register is
// written as a whole word. Active-low synchronous reset `rst_n`.
//
// The source design only names this block (an AXI4-Lite slave on the
// lightweight HPS-to-FPGA bridge); its internal structure is this
// implementation's own.
module axil_slave #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave port
  input  logic [ADDR_W-1:0]   s_awaddr,
  input  logic [2:0]          s_awprot,
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [DATA_W-1:0]   s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  input  logic                s_wvalid,
  output logic                s_wready,
  output logic [1:0]          s_bresp,
  output logic                s_bvalid,
  input  logic                s_bready,
  input  logic [ADDR_W-1:0]   s_araddr,
  input  logic [2:0]          s_arprot,
  input  logic                s_arvalid,
  output logic                s_arready,
  output logic [DATA_W-1:0]   s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rvalid,
  input  logic                s_rready,
  // Register strobes
  output logic                wr_en,
  output logic [ADDR_W-1:0]   wr_addr,
  output logic [DATA_W-1:0]   wr_data,
  output logic                rd_en,
  output logic [ADDR_W-1:0]   rd_addr,
  input  logic [DATA_W-1:0]   rd_data
);

  localparam logic [1:0] RESP_OKAY = 2'b00;

  logic aw_held, w_held;
  logic [ADDR_W-1:0] aw_q;
  logic [DATA_W-1:0] w_q;

  // A channel is ready while its buffer is empty.
  assign s_awready = !aw_held;
  assign s_wready  = !w_held;
  assign s_arready = !s_rvalid;

  assign wr_en   = aw_held && w_held && !s_bvalid;
  assign wr_addr = aw_q;
  assign wr_data = w_q;

  assign rd_en   = s_arvalid && s_arready;
  assign rd_addr = s_araddr;

  assign s_bresp = RESP_OKAY;
  assign s_rresp = RESP_OKAY;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_held  <= 1'b0;
      w_held   <= 1'b0;
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_awvalid && s_awready) begin
        aw_held <= 1'b1;
        aw_q    <= s_awaddr;
      end
      if (s_wvalid && s_wready) begin
        w_held  <= 1'b1;
        w_q     <= s_wdata;
      end
      if (wr_en) begin
        aw_held  <= 1'b0;
        w_held   <= 1'b0;
        s_bvalid <= 1'b1;
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end
      if (rd_en) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_data;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // Protocol rules on the slave's own outputs: a raised valid stays raised,
  // with its payload stable, until the master accepts it.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

  logic unused;
  assign unused = ^{s_awprot, s_arprot, s_wstrb};

endmodule
