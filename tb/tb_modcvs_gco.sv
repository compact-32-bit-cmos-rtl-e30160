// tb_modcvs_gco: self-checking test of the global completion.
//
// With the default 33 inputs: all high gives GCo high; any single input low,
// all low and random patterns that are not all ones give GCo low.
module tb_modcvs_gco;
  localparam int N = 33;
  logic [N-1:0] comp;
  logic         gco;
  int checks = 0, failures = 0;

  modcvs_gco dut (.comp, .gco);

  task automatic check(input bit expect_gco);
    #1;
    checks++;
    if (gco !== expect_gco) begin
      failures++;
      if (failures <= 20) $display("FAIL comp=%h gco=%b", comp, gco);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    comp = '1;
    check(1'b1);
    comp = '0;
    check(1'b0);
    for (int i = 0; i < N; i++) begin
      comp = '1;
      comp[i] = 1'b0;
      check(1'b0);
    end
    for (int t = 0; t < 200; t++) begin
      comp = {$urandom, $urandom};
      check(comp == '1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
