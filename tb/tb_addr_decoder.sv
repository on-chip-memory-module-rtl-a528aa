// tb_addr_decoder: exhaustive check of the one-hot decoder at N = 16 and at
// the default N = 256, including the disabled case and (for N = 12) the
// out-of-range addresses.
module tb_addr_decoder;
  int checks = 0, failures = 0;

  logic        en;
  logic [3:0]  a16;
  logic [15:0] s16;
  logic [7:0]  a256;
  logic [255:0] s256;
  logic [3:0]  a12;
  logic [11:0] s12;

  addr_decoder #(.N(16))  u16  (.en, .addr(a16),  .sel(s16));
  addr_decoder            u256 (.en, .addr(a256), .sel(s256));
  addr_decoder #(.N(12))  u12  (.en, .addr(a12),  .sel(s12));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++) begin
      en = e[0];
      for (int i = 0; i < 256; i++) begin
        a16 = i[3:0]; a256 = i[7:0]; a12 = i[3:0];
        #1;
        check(s256 == (e ? (256'(1) << i) : '0), $sformatf("N=256 en=%0d addr=%0d", e, i));
        if (i < 16) begin
          check(s16 == (e ? (16'(1) << i) : '0), $sformatf("N=16 en=%0d addr=%0d", e, i));
          check(s12 == ((e && i < 12) ? (12'(1) << i) : '0), $sformatf("N=12 en=%0d addr=%0d", e, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
