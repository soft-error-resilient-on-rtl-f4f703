// tb_ird_operand_check: self-checking testbench of the operand read check.
//
// Register words are built from random values of every class with correct
// parity, then zero, one or two bits of the 66-bit word or of the two parity
// bits are flipped. The expected outcome is computed from where the flips
// fell: a narrow value with its low half good reads correctly; with only the
// low half bad it is recovered from the high half (and `repaired` holds the
// corrected word); with both halves bad it raises an exception; a regular
// value raises an exception on any parity mismatch. Flag flips are counted in
// both halves.
module tb_ird_operand_check;
  import ser_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  rf_word_t word, repaired;
  logic [1:0] par;
  logic [63:0] operand;
  logic is_narrow, detected, recover, exception;
  ird_operand_check dut (.*);

  // the same module can be used for both settings; only the default is checked here
  function automatic logic [63:0] classify(input logic [63:0] v, output rf_word_t w);
    if ($signed(v) >= -64'sd2147483648 && $signed(v) <= 64'sd2147483647) begin
      w.flag = NW_SIGNED; w.data = {v[31:0], v[31:0]};
    end else if (v[63:32] == 32'h1) begin
      w.flag = NW_ADDR34; w.data = {v[31:0], v[31:0]};
    end else begin
      w.flag = NW_REGULAR; w.data = v;
    end
    return v;
  endfunction

  initial begin
    int n_ok = 0, n_rec = 0, n_exc = 0;
    for (int i = 0; i < 40000; i++) begin
      logic [63:0] v;
      rf_word_t w, wf;
      logic [1:0] p, pf;
      int nflip;
      bit lo_bad, hi_bad, nar;
      case (int'($urandom_range(0, 2)))
        0: v = {{33{1'b0}}, 31'($urandom)};
        1: v = {32'h1, $urandom};
        default: v = {$urandom, $urandom};
      endcase
      if ($urandom_range(0, 1)) v = -v;
      void'(classify(v, w));
      p = rf_parity(w);
      wf = w; pf = p;
      nflip = $urandom_range(0, 2);
      for (int f = 0; f < nflip; f++) begin
        int b;
        b = $urandom_range(0, 67);
        if (b < 66) wf[b] = ~wf[b]; else pf[b - 66] = ~pf[b - 66];
      end
      word = wf; par = pf;
      #1;
      lo_bad = (^{wf.flag, wf.data[31:0]}) != pf[0];
      hi_bad = (^{wf.flag, wf.data[63:32]}) != pf[1];
      nar = (wf.flag == NW_SIGNED) || (wf.flag == NW_ADDR34);
      check(is_narrow == nar, "narrow read");
      if (nar) begin
        check(detected == lo_bad, "narrow: only the low half is checked");
        check(recover == (lo_bad && !hi_bad), "narrow: recovery when the high half is good");
        check(exception == (lo_bad && hi_bad), "narrow: exception when both halves fail");
        if (!lo_bad && wf.flag == w.flag && wf.data[31:0] == w.data[31:0])
          check(operand == v, $sformatf("narrow operand %h expected %h", operand, v));
        if (recover && wf.flag == w.flag && wf.data[63:32] == w.data[63:32]) begin
          check(operand == v, "recovered operand");
          check(repaired.data == w.data && repaired.flag == w.flag, "repaired word");
          check(rf_parity(repaired)[0] == pf[1] || pf[1] != p[1], "repaired low parity equals high parity");
        end
      end else begin
        check(!recover, "regular: no recovery");
        check(exception == (lo_bad || hi_bad) && detected == exception, "regular: any mismatch is an exception");
        if (!exception && wf == w) check(operand == v, "regular operand");
      end
      n_ok += int'(!detected); n_rec += int'(recover); n_exc += int'(exception);
    end
    check(n_ok > 1000 && n_rec > 1000 && n_exc > 1000, $sformatf("outcomes ok=%0d rec=%0d exc=%0d", n_ok, n_rec, n_exc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
