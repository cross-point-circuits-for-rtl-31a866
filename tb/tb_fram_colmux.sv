// tb_fram_colmux: checks the 2:1 column mux and the reconfigurable sensing
// for an 80-bit word on 160 bit-lines. In 1T-1C mode the selected column of
// each pair is enabled and carries the bit, and sensing compares each line
// with vref. In 2T-2C mode both columns are enabled with true/complement
// data, and sensing compares the pair. The word gather must undo the write
// mapping. The block is combinational.
//
// 1T-1C sensing against vref and complementary 2T-2C storage follow the
// published FRAM; the column order (true data in the even column) is this
// design's own.
module tb_fram_colmux;
  localparam int W = 80, VW = 8, NCOL = 2 * W;

  logic mode_2t2c = 0, sel = 0;
  logic [W-1:0] wword = '0, rword;
  logic [NCOL-1:0] col_en, col_d, sense_d, rdata_phys = '0;
  logic [NCOL-1:0][VW-1:0] bl_v = '0;
  logic [VW-1:0] vref = '0;

  fram_colmux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      mode_2t2c = t % 2;
      sel = $urandom_range(0, 1);
      for (int i = 0; i < W; i += 16) wword[i +: 16] = 16'($urandom);
      vref = VW'($urandom_range(60, 190));
      for (int c = 0; c < NCOL; c++) bl_v[c] = VW'($urandom);
      #1;
      for (int k = 0; k < W; k++) begin
        if (mode_2t2c) begin
          check(col_en[2*k] && col_en[2*k+1], "both columns enabled");
          check(col_d[2*k] == wword[k] && col_d[2*k+1] == !wword[k], "true/complement");
          check(sense_d[2*k] == (bl_v[2*k] > bl_v[2*k+1]), "differential sense");
          check(sense_d[2*k+1] == !sense_d[2*k], "complement sense");
        end else begin
          check(col_en[2*k+sel] && !col_en[2*k+!sel], "one column of the pair");
          check(col_d[2*k+sel] == wword[k], "data on selected column");
          check(sense_d[2*k] == (bl_v[2*k] > vref) && sense_d[2*k+1] == (bl_v[2*k+1] > vref),
                "single-ended sense against vref");
        end
      end
      // gather: the data written must come back as the word
      rdata_phys = col_d;
      #1;
      check(rword == wword, "gather inverts the write mapping");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
