// Testbench of the collision logic: all eight combinations of ready results,
// checking that the oldest wins the port and that exactly the younger ready
// results are told to wait.
module tb_fadd_collision;
  logic        rdy1, rdy2, rdy3, out_valid, defer1, defer2;
  logic [69:0] d1, d2, d3, out_data;
  logic [1:0]  out_stage;
  int checks = 0, failures = 0;

  fadd_collision dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic [69:0] wd;
      int ws;
      {rdy3, rdy2, rdy1} = 3'(n);
      d1 = 70'({$urandom, $urandom, $urandom}); d2 = 70'({$urandom, $urandom, $urandom});
      d3 = 70'({$urandom, $urandom, $urandom});
      #1;
      ws = rdy3 ? 3 : rdy2 ? 2 : rdy1 ? 1 : 0;
      wd = (ws == 3) ? d3 : (ws == 2) ? d2 : d1;
      checks++;
      if (out_valid !== (ws != 0) || int'(out_stage) != ws || (ws != 0 && out_data !== wd)
          || defer1 !== (rdy1 && (rdy2 || rdy3)) || defer2 !== (rdy2 && rdy3)) begin
        failures++; $display("FAIL ready %b", {rdy3, rdy2, rdy1});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
