// tb_status_propagation: ER/EA/DNS/INS/CS forwarding and decoding of one router.
module tb_status_propagation;
  import altertest_pkg::*;
  logic clk = 0, rst_n = 0;
  sync_t [NSIDES-1:0] sync_in, sync_out;
  logic er, dns, cs_en, cs_sel, cs_n_en, cs_n_sel, cs_s_en, cs_s_sel;
  side_e ladder_side;
  logic [NSIDES-1:0] busy_toward, ea_in;
  nbr_status_t nbr;
  int checks = 0, failures = 0;

  status_propagation dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sync_in = '0; er = 0; dns = 0; cs_en = 0; cs_sel = 0; ladder_side = D_N; busy_toward = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // I am under test, bypass towards north on channel 2
    er = 1; dns = 1; cs_en = 1; cs_sel = 1;
    @(negedge clk);
    for (int d = 0; d < 4; d++) begin
      chk(sync_out[d].er && sync_out[d].dns, "er/dns to all sides");
      chk(sync_out[d].cs_en == (d == int'(D_N)), "cs only to the ladder");
    end
    chk(sync_out[D_N].cs_sel, "cs select");
    er = 0; dns = 0; cs_en = 0;
    // north neighbor is a RUT: forwarded as INS to east and west, not north/south
    sync_in[D_N].dns = 1; sync_in[D_N].er = 1;
    busy_toward = 4'b0001;            // a packet partly sent to the north
    @(negedge clk);
    chk(sync_out[D_E].ins_n && sync_out[D_W].ins_n, "ins_n to E and W");
    chk(!sync_out[D_N].ins_n && !sync_out[D_S].ins_n, "no ins to N and S");
    chk(!sync_out[D_N].ea, "no EA while a packet is in progress");
    chk(nbr.n && !nbr.s && !nbr.e, "direct status decode");
    busy_toward = '0;
    @(negedge clk);
    chk(sync_out[D_N].ea && !sync_out[D_E].ea, "EA once idle, only to the requester");
    // south neighbor RUT with bypass to me
    sync_in = '0;
    sync_in[D_S].dns = 1; sync_in[D_S].cs_en = 1; sync_in[D_S].cs_sel = 0;
    #1;
    chk(nbr.s && cs_s_en && !cs_s_sel && !cs_n_en, "cs decode from south");
    @(negedge clk);
    chk(sync_out[D_W].ins_s && sync_out[D_E].ins_s, "ins_s to E and W");
    // indirect status decode
    sync_in = '0;
    sync_in[D_E].ins_n = 1; sync_in[D_W].ins_s = 1; sync_in[D_W].ea = 1;
    #1;
    chk(nbr.ne && nbr.sw && !nbr.nw && !nbr.se, "indirect decode");
    chk(ea_in == 4'b1000, "ea_in from west");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
