// tb_core_link_mux: self-checking test of the per-slot multiplexer.
//
// For every corner selection, random flits, valids and readies are applied on
// both sides. The expected outputs are worked out here from the rule: the
// core's flit goes to all corners but valid only to the selected one; the
// core's ready comes from the selected operator; the core receives the
// selected operator's flit and valid; only the selected operator sees the
// core's ready.
module tb_core_link_mux;
  import noc_pkg::*;

  corner_t sel;
  flit_t   core_tx, core_rx;
  logic    core_tx_valid, core_tx_ready, core_rx_valid, core_rx_ready;
  flit_t   to_op [4], from_op [4];
  logic    to_op_valid [4], to_op_ready [4], from_op_valid [4], from_op_ready [4];

  int checks = 0, failures = 0;

  core_link_mux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (sel=%0d)", what, sel);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      sel           = corner_t'(n % 4);
      core_tx       = flit_t'({$urandom, $urandom});
      core_tx_valid = 1'($urandom);
      core_rx_ready = 1'($urandom);
      for (int k = 0; k < 4; k++) begin
        from_op[k]       = flit_t'({$urandom, $urandom});
        from_op_valid[k] = 1'($urandom);
        to_op_ready[k]   = 1'($urandom);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        bit chosen;
        chosen = (k == int'(sel));
        check(to_op[k] == core_tx, "flit broadcast to corner");
        check(to_op_valid[k] == (chosen && core_tx_valid), "valid only towards selected corner");
        check(from_op_ready[k] == (chosen && core_rx_ready), "ready only towards selected corner");
      end
      case (sel)
        2'd0: begin
          check(core_tx_ready == to_op_ready[0], "tx ready from corner 0");
          check(core_rx == from_op[0] && core_rx_valid == from_op_valid[0], "rx from corner 0");
        end
        2'd1: begin
          check(core_tx_ready == to_op_ready[1], "tx ready from corner 1");
          check(core_rx == from_op[1] && core_rx_valid == from_op_valid[1], "rx from corner 1");
        end
        2'd2: begin
          check(core_tx_ready == to_op_ready[2], "tx ready from corner 2");
          check(core_rx == from_op[2] && core_rx_valid == from_op_valid[2], "rx from corner 2");
        end
        default: begin
          check(core_tx_ready == to_op_ready[3], "tx ready from corner 3");
          check(core_rx == from_op[3] && core_rx_valid == from_op_valid[3], "rx from corner 3");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
