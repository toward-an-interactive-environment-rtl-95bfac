// tb_signal_mux: every select value with random inputs, for N = 4 and N = 3
// (where select 3 is out of range and gives 0).
module tb_signal_mux;
  logic [3:0] sig4;
  logic [2:0] sig3;
  logic [1:0] sel;
  logic       out4, out3;
  int checks = 0, failures = 0;

  signal_mux #(.N(4)) dut4 (.sig(sig4), .sel, .out(out4));
  signal_mux #(.N(3)) dut3 (.sig(sig3), .sel, .out(out3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      sig4 = 4'($urandom);
      sig3 = 3'($urandom);
      sel  = 2'(t);
      #1;
      checks += 2;
      if (out4 !== sig4[sel]) begin failures++; $display("FAIL: N=4 sel=%0d", sel); end
      if (out3 !== (sel == 3 ? 1'b0 : sig3[sel])) begin
        failures++; $display("FAIL: N=3 sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
