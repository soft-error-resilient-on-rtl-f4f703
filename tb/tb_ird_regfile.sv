// tb_ird_regfile: self-checking testbench of the register-file storage.
//
// Small configuration (16 registers, 2 write ports, 4 read/repair ports).
// Random data writes, parity writes, low-half repairs and single-bit
// injections are applied and every read port is compared each cycle with a
// reference model: data and parity are separate arrays written independently;
// a repair copies the high half into the low half and sets the low parity
// bit; an injection flips exactly the addressed data, flag or parity bit.
// Writes, parity writes, repairs and injections of one cycle go to distinct
// registers.
module tb_ird_regfile;
  import ser_pkg::*;
  localparam int N = 16, W = 2, R = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [W-1:0] wr_en = '0, pw_en = '0;
  logic [3:0] wr_idx [W], pw_idx [W], rep_idx [R], rd_idx [R];
  rf_word_t wr_data [W], rd_data [R];
  logic [1:0] pw_par [W], rd_par [R];
  logic [R-1:0] rep_en = '0;
  logic rep_plo [R];
  logic inj_valid = 0;
  logic [3:0] inj_idx = '0;
  logic [6:0] inj_bit = '0;
  ird_regfile #(.NREGS(N), .NWR(W), .NRD(R)) dut (.*);

  rf_word_t md [N];
  logic [1:0] mp [N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin md[i] = '0; mp[i] = '0; end
    for (int k = 0; k < W; k++) begin wr_idx[k] = '0; pw_idx[k] = '0; wr_data[k] = '0; pw_par[k] = '0; end
    for (int k = 0; k < R; k++) begin rep_idx[k] = '0; rd_idx[k] = '0; rep_plo[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int used [N];
      for (int i = 0; i < N; i++) used[i] = 0;
      // distinct targets per cycle, as the datapath guarantees
      for (int k = 0; k < W; k++) begin
        int d;
        do d = $urandom_range(0, N - 1); while (used[d] != 0);
        used[d] = 1;
        wr_idx[k] = 4'(d); wr_en[k] = $urandom_range(0, 1);
        wr_data[k] = {2'($urandom), $urandom, $urandom};
        do d = $urandom_range(0, N - 1); while (used[d] != 0);
        used[d] = 2;
        pw_idx[k] = 4'(d); pw_en[k] = $urandom_range(0, 1); pw_par[k] = 2'($urandom);
      end
      for (int k = 0; k < R; k++) begin
        int d;
        rd_idx[k] = 4'($urandom);
        do d = $urandom_range(0, N - 1); while (used[d] != 0);
        used[d] = 3;
        rep_idx[k] = 4'(d); rep_en[k] = $urandom_range(0, 3) == 0; rep_plo[k] = 1'($urandom);
      end
      inj_valid = $urandom_range(0, 3) == 0;
      begin
        int d;
        do d = $urandom_range(0, N - 1); while (used[d] != 0);
        inj_idx = 4'(d);
      end
      inj_bit = 7'($urandom_range(0, 67));
      #1;
      for (int k = 0; k < R; k++)
        check(rd_data[k] == md[rd_idx[k]] && rd_par[k] == mp[rd_idx[k]], $sformatf("read port %0d", k));
      @(posedge clk);
      for (int k = 0; k < W; k++) begin
        if (wr_en[k]) md[wr_idx[k]] = wr_data[k];
        if (pw_en[k]) mp[pw_idx[k]] = pw_par[k];
      end
      for (int k = 0; k < R; k++) if (rep_en[k]) begin
        md[rep_idx[k]].data[31:0] = md[rep_idx[k]].data[63:32];
        mp[rep_idx[k]][0] = rep_plo[k];
      end
      if (inj_valid) begin
        if (inj_bit < 66) md[inj_idx][inj_bit] = ~md[inj_idx][inj_bit];
        else mp[inj_idx][inj_bit - 66] = ~mp[inj_idx][inj_bit - 66];
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
