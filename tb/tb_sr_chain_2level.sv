// tb_sr_chain_2level: checks the default 256-word-line two-level chain
// against an integer position model. Random loads from the predecoded address
// are followed by random shifts of random signed steps (forward, backward,
// single and multi-position), kept inside the chain. After every edge the
// word lines must be one-hot at the model's position, and only the cluster
// holding or receiving the token may get a local shift_1.
module tb_sr_chain_2level;
  localparam int W = 256, R1 = 16, S = 4, C = W / (R1 * S), SW = 9;
  int checks = 0, failures = 0, n_fwd = 0, n_bwd = 0, n_cross = 0, n_l2only = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n, load, shift;
  logic [W/S-1:0] load_l1;
  logic [S-1:0]   load_l2;
  logic signed [SW-1:0] step;
  logic [W-1:0]   wl;
  logic [C-1:0]   shift1;

  sr_chain_2level dut (.clk, .rst_n, .load, .load_l1, .load_l2, .shift, .step, .wl, .shift1);

  int pos;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; load = 0; shift = 0; load_l1 = 0; load_l2 = 0; step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(wl == '0, "no word line after reset");
    repeat (200) begin
      pos = $urandom_range(W - 1);
      load = 1; load_l1 = (W/S)'(1) << (pos / S); load_l2 = S'(1) << (pos % S);
      @(negedge clk);
      load = 0;
      check(wl == (W'(1) << pos), $sformatf("load %0d", pos));
      repeat (20) begin
        int st, np;
        case ($urandom_range(3))
          0: st = 1;
          1: st = -1;
          2: st = $urandom_range(16) - 8;
          default: st = $urandom_range(64) - 32;
        endcase
        np = pos + st;
        if (np < 0 || np >= W) st = 0;
        np = pos + st;
        shift = 1; step = SW'(st);
        #1;
        // expected local shift_1: only if the level-one register moves
        if ((pos / S) != (np / S)) begin
          for (int k = 0; k < C; k++)
            check(shift1[k] == (k == pos / (R1 * S) || k == np / (R1 * S)),
                  $sformatf("shift_1 of cluster %0d, %0d -> %0d", k, pos, np));
        end else begin
          check(shift1 == '0, "no shift_1 within one level-one register");
          if (st != 0) n_l2only++;
        end
        if (pos / (R1 * S) != np / (R1 * S)) n_cross++;
        if (st > 0) n_fwd++;
        if (st < 0) n_bwd++;
        @(negedge clk);
        shift = 0;
        pos = np;
        check(wl == (W'(1) << pos), $sformatf("position %0d after step %0d", pos, st));
      end
    end
    check(n_fwd > 0 && n_bwd > 0 && n_cross > 0 && n_l2only > 0, "all shift kinds seen");
    $display("forward=%0d backward=%0d cluster crossings=%0d level-two only=%0d",
             n_fwd, n_bwd, n_cross, n_l2only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
