// tb_crossbar: checks the layered crossbar. For random EXU outputs and input
// bus values, every EXU input is routed from every possible source (the
// three neighbours through Type I, the other half and the buses through
// Type II) and compared with that source. Output buses are checked with one
// driver each, and the static flag routing with random configurations.
module tb_crossbar;
  import paddi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0;
  logic [W-1:0] exu_y [NEXU], in_bus [NIBUS], xin1 [NEXU], xin2 [NEXU], out_bus [NOBUS];
  port_sel_t sel1 [NEXU], sel2 [NEXU];
  logic [NOBUS-1:0] obus_en [NEXU];
  logic [NEXU-1:0] exu_flag, flag1, flag2;
  logic [NFIN-1:0] flag_in;
  logic [NFOUT-1:0] flag_out;
  exu_cfg_t cfg [NEXU];

  crossbar dut (.*);

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] srcval(input int s);
    return (s < NEXU) ? exu_y[s] : in_bus[s - NEXU];
  endfunction

  initial begin
    logic [NFOUT-1:0] efo;
    logic e1, e2;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < NEXU; i++) begin exu_y[i] = 16'($urandom); obus_en[i] = '0; end
      for (int k = 0; k < NIBUS; k++) in_bus[k] = 16'($urandom);
      for (int s = 0; s < NEXU + NIBUS; s++) begin
        for (int i = 0; i < NEXU; i++) begin
          if (s == i) continue;           // own output uses the local feedback path
          sel1[i] = src_sel(i, s);
          sel2[i] = src_sel(i, (s + 1) % (NEXU + NIBUS) == i ? s : (s + 1) % (NEXU + NIBUS));
        end
        #1;
        for (int i = 0; i < NEXU; i++) begin
          int s2;
          if (s == i) continue;
          s2 = ((s + 1) % (NEXU + NIBUS) == i) ? s : (s + 1) % (NEXU + NIBUS);
          checks++;
          if (xin1[i] !== srcval(s) || xin2[i] !== srcval(s2)) begin
            failures++;
            if (failures < 10) $display("FAIL exu %0d src %0d/%0d: %h %h", i, s, s2, xin1[i], xin2[i]);
          end
        end
      end
      // output buses: bus k driven by EXU d[k]
      for (int k = 0; k < NOBUS; k++) obus_en[(n + 3 * k) % NEXU][k] = 1'b1;
      #1;
      for (int k = 0; k < NOBUS; k++) begin
        checks++;
        if (out_bus[k] !== exu_y[(n + 3 * k) % NEXU]) begin
          failures++; $display("FAIL out bus %0d", k);
        end
      end
      // flags
      exu_flag = 8'($urandom); flag_in = 2'($urandom);
      for (int i = 0; i < NEXU; i++) begin
        cfg[i] = exu_cfg_t'($urandom);
      end
      #1;
      efo = '0;
      for (int i = 0; i < NEXU; i++) begin
        e1 = (cfg[i].f1src < 8) ? exu_flag[cfg[i].f1src] : (cfg[i].f1src < 10) ? flag_in[cfg[i].f1src - 8] : 1'b0;
        e2 = (cfg[i].f2src < 8) ? exu_flag[cfg[i].f2src] : (cfg[i].f2src < 10) ? flag_in[cfg[i].f2src - 8] : 1'b0;
        if (exu_flag[i]) efo |= cfg[i].flagout;
        checks++;
        if (flag1[i] !== e1 || flag2[i] !== e2) begin failures++; $display("FAIL flags %0d", i); end
      end
      checks++;
      if (flag_out !== efo) begin failures++; $display("FAIL flag_out"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
