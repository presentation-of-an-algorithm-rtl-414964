// tb_mux_config_regs: self-checking test of the configuration registers.
//
// Runs on a 3-row by 5-column grid so that rows and columns differ. After
// reset every slot must select corner 0. Then random writes, legal and
// illegal, are issued; a reference copy kept here decides legality from the
// slot's row and column (a corner is legal when row + sel[1] < rows and
// column + sel[0] < columns) and must match cfg_ack / cfg_err one cycle later
// and the register contents after every write.
module tb_mux_config_regs;
  import noc_pkg::*;

  localparam int unsigned X = 3;
  localparam int unsigned Y = 5;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     cfg_we;
  core_id_t cfg_core;
  corner_t  cfg_sel;
  logic     cfg_ack, cfg_err;
  corner_t  core_sel [X*Y];

  corner_t  model [X*Y];
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0;

  mux_config_regs #(.X(X), .Y(Y)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_core = '0; cfg_sel = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < X*Y; k++) begin
      model[k] = 2'd0;
      check(core_sel[k] == 2'd0, "reset selects corner 0");
    end
    for (int n = 0; n < 600; n++) begin
      int unsigned c, s, row, col;
      bit legal;
      c   = $urandom_range(X*Y + 2);     // a few out-of-range slots too
      s   = $urandom_range(3);
      row = c / Y;
      col = c % Y;
      legal = (c < X*Y) && (row + s / 2 < X) && (col + s % 2 < Y);
      @(negedge clk);
      cfg_we = 1'b1; cfg_core = core_id_t'(c); cfg_sel = corner_t'(s);
      @(negedge clk);
      cfg_we = 1'b0;
      check(cfg_ack == legal, "cfg_ack");
      check(cfg_err == !legal, "cfg_err");
      if (legal) begin
        model[c] = corner_t'(s);
        n_acc++;
      end else n_rej++;
      for (int k = 0; k < X*Y; k++) check(core_sel[k] == model[k], "register contents");
      @(negedge clk);
      check(!cfg_ack && !cfg_err, "ack/err last one cycle");
    end
    check(n_acc > 0 && n_rej > 0, "both accepted and rejected writes seen");
    $display("accepted=%0d rejected=%0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
