// tb_crossbar: random ownership patterns; each output must carry the flit
// of its owner and be valid exactly when it is held and the owner fires.
module tb_crossbar;
  import aios_pkg::*;
  flit_t in_flit [NUM_IN];
  logic in_fire [NUM_IN];
  logic [NUM_OUT-1:0] busy;
  logic [2:0] owner [NUM_OUT];
  flit_t out_flit [NUM_OUT];
  logic [NUM_OUT-1:0] out_valid;
  int checks = 0, failures = 0;
  crossbar dut (.*);
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NUM_IN; i++) begin in_flit[i] = $urandom; in_fire[i] = 1'($urandom); end
      busy = NUM_OUT'($urandom);
      for (int o = 0; o < NUM_OUT; o++) owner[o] = 3'($urandom_range(NUM_IN - 1));
      #1;
      for (int o = 0; o < NUM_OUT; o++) begin
        checks++;
        if (out_flit[o] != in_flit[owner[o]] || out_valid[o] != (busy[o] && in_fire[owner[o]])) begin
          failures++; if (failures < 5) $display("FAIL t=%0d o=%0d", t, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
