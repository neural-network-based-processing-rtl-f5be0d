// tb_weight_memory: checks the per-neuron weight RAM.
// Writes random words to every address, reads them back and checks the
// one-cycle read latency, that the output holds while the read enable is low,
// that a write and a read in the same cycle to different addresses both take
// effect, and that a second instance is initialised from a memory file.
module tb_weight_memory;
  localparam int unsigned N  = 20;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned DW = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          wen, ren, ren_i;
  logic [AW-1:0] wadd, radd, radd_i;
  logic [DW-1:0] win, wout, wout_i;
  logic [DW-1:0] model [N];

  weight_memory #(.NUM_WEIGHT(N), .DATA_W(DW)) dut (
    .clk, .wen, .wadd, .win, .ren, .radd, .wout);

  weight_memory #(.NUM_WEIGHT(8), .DATA_W(DW), .INIT_FILE("tb/weight_init.mem")) dut_init (
    .clk, .wen(1'b0), .wadd('0), .win('0), .ren(ren_i), .radd(radd_i[2:0]), .wout(wout_i));

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [DW-1:0] INIT_EXP [8] = '{12'h001, 12'h002, 12'h7FF, 12'h800,
                                             12'hFFF, 12'h555, 12'hAAA, 12'h0F0};

  initial begin
    wen = 0; ren = 0; wadd = 0; radd = 0; win = 0; ren_i = 0; radd_i = 0;
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      wen = 1; wadd = AW'(a); win = DW'($urandom); model[a] = win;
      @(negedge clk);
    end
    wen = 0;
    // read back, one cycle latency
    for (int a = 0; a < N; a++) begin
      ren = 1; radd = AW'(a);
      @(negedge clk);
      check($sformatf("read addr %0d", a), wout, model[a]);
    end
    // output holds while ren is low
    ren = 0; radd = 0;
    repeat (3) @(negedge clk);
    check("hold with ren low", wout, model[N-1]);
    // write and read different addresses in the same cycle
    wen = 1; wadd = 3; win = 12'h5A5; ren = 1; radd = 7;
    @(negedge clk);
    check("read during write", wout, model[7]);
    model[3] = 12'h5A5;
    wen = 0; radd = 3;
    @(negedge clk);
    check("write during read stored", wout, model[3]);
    ren = 0;
    // file-initialised instance
    for (int a = 0; a < 8; a++) begin
      ren_i = 1; radd_i = AW'(a);
      @(negedge clk);
      check($sformatf("init file addr %0d", a), wout_i, INIT_EXP[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
