// tb_ram_mem: checks the delay-line RAM against an array model.
//
// After reset every word must read 0. Then random cycles of write, read and
// disabled access run against a model: reads return the last word written to
// the address one cycle later, writes and disabled cycles leave do_a as it
// was, and a write with en = 0 changes nothing.
module tb_ram_mem;
  import interp_pkg::*;
  logic clk = 1'b0;
  logic rst, we, en;
  logic [5:0] addr_a;
  sample_t di, do_a;

  ram_mem dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sample_t model [38];
  sample_t exp_do;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; we = 0; en = 0; addr_a = 0; di = 0;
    for (int i = 0; i < 38; i++) model[i] = '0;
    @(posedge clk); #1 rst = 1'b0;
    exp_do = '0;
    for (int i = 0; i < 38; i++) begin
      @(negedge clk); en = 1; we = 0; addr_a = 6'(i);
      @(posedge clk); #1;
      chk(do_a == 0, $sformatf("word %0d cleared by reset", i));
    end
    for (int n = 0; n < 3000; n++) begin
      int op;
      op = $urandom_range(0, 3);
      @(negedge clk);
      addr_a = 6'($urandom_range(0, 37));
      di = sample_t'($urandom);
      en = (op != 3);
      we = (op == 0 || op == 3);
      @(posedge clk); #1;
      if (en && we) model[addr_a] = di;
      else if (en) exp_do = model[addr_a];
      chk(do_a == exp_do, $sformatf("cycle %0d op %0d addr %0d: got %h exp %h", n, op, addr_a, do_a, exp_do));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
