// tb_xbar_4x8: random requests and bank selects; checks that each bank receives the
// lowest-numbered input that asked for it with the right entry and value, and that
// exactly those inputs are granted (conflicting inputs are held back).
module tb_xbar_4x8;
  import candles_pkg::*;
  logic [3:0] req, grant;
  logic [3:0][2:0] bank_sel;
  logic [3:0][5:0] entry;
  psum_t val [4];
  logic [7:0] out_valid;
  logic [7:0][5:0] out_entry;
  psum_t out_val [8];
  int checks = 0, failures = 0, conflicts = 0;

  xbar_4x8 dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [7:0] taken;
      logic [3:0] eg;
      req = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        bank_sel[i] = 3'($urandom % ((t % 2) ? 8 : 3));
        entry[i] = 6'($urandom);
        val[i] = psum_t'($urandom);
      end
      #1;
      taken = '0; eg = '0;
      for (int i = 0; i < 4; i++)
        if (req[i]) begin
          if (!taken[bank_sel[i]]) begin
            taken[bank_sel[i]] = 1'b1; eg[i] = 1'b1;
            checks++;
            if (out_entry[bank_sel[i]] != entry[i] || out_val[bank_sel[i]] != val[i]) begin
              failures++; $display("FAIL route t=%0d i=%0d", t, i);
            end
          end else conflicts++;
        end
      checks += 2;
      if (grant != eg) begin failures++; $display("FAIL grant t=%0d %b exp %b", t, grant, eg); end
      if (out_valid != taken) begin failures++; $display("FAIL valid t=%0d", t); end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflict exercised"); end
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
