// Self-checking testbench of redac_mux: random requests from both sources,
// random select, output compared with the selected source every step.
module tb_redac_mux;
  localparam int unsigned N = 13;
  logic sel, convert0, convert1, convert;
  logic [N-1:0] data0, data1, data;
  int checks = 0, failures = 0;

  redac_mux #(.N(N)) dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = 1'($urandom); convert0 = 1'($urandom); convert1 = 1'($urandom);
      data0 = N'($urandom); data1 = N'($urandom);
      #1;
      checks++;
      if (convert !== (sel ? convert1 : convert0) || data !== (sel ? data1 : data0)) begin
        failures++;
        $display("FAIL: sel=%0b convert=%0b data=%0h", sel, convert, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
