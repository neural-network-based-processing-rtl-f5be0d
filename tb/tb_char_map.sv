// tb_char_map: checks the class-to-character mapping for all 343 classes
// against a few code points read off the Ethiopic block (class 0 is U+1200
// HA, class 8 is U+1208 LA, class 24 is U+1218 MA, class 342 is U+1356) and
// against 0x1200 + class for every class.
module tb_char_map;
  int checks = 0, failures = 0;

  logic [8:0]  class_id;
  logic [20:0] code_point;

  char_map #(.IDX_W(9)) dut (.class_id, .code_point);

  task automatic check(int cls, int exp);
    class_id = 9'(cls);
    #1;
    checks++;
    if (int'(code_point) != exp) begin
      failures++; $display("FAIL class %0d: U+%04h expected U+%04h", cls, code_point, exp);
    end
  endtask

  initial begin
    check(0, 'h1200);
    check(8, 'h1208);
    check(24, 'h1218);
    check(342, 'h1356);
    for (int c = 0; c < 343; c++) check(c, 4608 + c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
