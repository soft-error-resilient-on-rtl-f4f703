// tb_nw_detect: self-checking testbench of the narrow-value detector.
//
// Boundary values (0, +/-2^31 edges, the 34-bit address range 2^32 ..
// 2^33-1 and its neighbours, all ones) and random values of each class are
// applied. For every value the testbench checks the class flag, that a
// narrow value is stored as its low 32 bits twice, that a regular value is
// stored unchanged, and that the value can be rebuilt from the stored word.
module tb_nw_detect;
  import ser_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] value;
  rf_word_t word;
  logic narrow;
  nw_detect dut (.*);

  task automatic apply(input logic [63:0] v);
    nw_flag_e ef;
    logic [63:0] back;
    value = v;
    #1;
    if ($signed(v) >= -64'sd2147483648 && $signed(v) <= 64'sd2147483647) ef = NW_SIGNED;
    else if (v >= 64'h1_0000_0000 && v <= 64'h1_FFFF_FFFF) ef = NW_ADDR34;
    else ef = NW_REGULAR;
    check(word.flag == ef, $sformatf("%h: flag %b expected %b", v, word.flag, ef));
    check(narrow == (ef != NW_REGULAR), $sformatf("%h: narrow", v));
    if (ef == NW_REGULAR) check(word.data == v, "regular value stored as is");
    else check(word.data == {v[31:0], v[31:0]}, "narrow value stored twice");
    back = (word.flag == NW_REGULAR) ? word.data :
           (word.flag == NW_ADDR34) ? {32'h1, word.data[31:0]} : {{32{word.data[31]}}, word.data[31:0]};
    check(back == v, $sformatf("%h rebuilt as %h", v, back));
  endtask

  initial begin
    logic [63:0] edges [14] = '{64'h0, 64'h1, 64'h7FFF_FFFF, 64'h8000_0000, 64'hFFFF_FFFF,
      64'h1_0000_0000, 64'h1_FFFF_FFFF, 64'h2_0000_0000, 64'hFFFF_FFFF_8000_0000,
      64'hFFFF_FFFF_7FFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000,
      64'h3_0000_0001, 64'hFFFF_FFFE_FFFF_FFFF};
    foreach (edges[i]) apply(edges[i]);
    for (int i = 0; i < 20000; i++) begin
      case (int'($urandom_range(0, 3)))
        0: apply({{32{1'b0}}, 1'b0, 31'($urandom)});
        1: apply({{33{1'b1}}, 31'($urandom)});
        2: apply({32'h1, $urandom});
        default: apply({$urandom, $urandom});
      endcase
    end
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
