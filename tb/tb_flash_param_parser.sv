// tb_flash_param_parser: sends garbage, the start tag, records for capacity,
// blocks, pages per block and an unknown id, the end flag and more garbage;
// checks the three values and table_valid. Then checks that a table whose tag
// is damaged is not accepted and that clear resets the outputs.
module tb_flash_param_parser;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [7:0] in_data = '0;
  logic table_valid;
  logic [31:0] total_capacity, total_blocks, pages_per_block;
  int checks = 0, failures = 0;

  flash_param_parser dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic put(logic [7:0] b);
    @(negedge clk) in_valid = 1; in_data = b;
    @(negedge clk) in_valid = 0;
  endtask

  task automatic rec(logic [7:0] id, logic [31:0] v);
    put(id); put(v[7:0]); put(v[15:8]); put(v[23:16]); put(v[31:24]);
  endtask

  task automatic send_table(logic [31:0] tag);
    put(8'h46); put(8'h00); put(8'h12);
    put(tag[31:24]); put(tag[23:16]); put(tag[15:8]); put(tag[7:0]);
    rec(8'd1, 32'd1_984_000);    // sectors of a 1 GB card
    rec(8'd7, 32'hDEAD_BEEF);    // unknown id, skipped
    rec(8'd2, 32'd2048);         // two 1024-block chips
    rec(8'd3, 32'd64);
    put(8'hFF);
    rec(8'd1, 32'd5);            // after the end flag: ignored
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!table_valid, "not valid at reset");
    send_table(32'h4650_524D);
    check(table_valid, "table valid");
    check(total_capacity == 32'd1_984_000, "capacity");
    check(total_blocks == 32'd2048, "blocks");
    check(pages_per_block == 32'd64, "pages per block");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(!table_valid && total_capacity == 0, "clear");
    send_table(32'h4650_5200);
    check(!table_valid && total_blocks == 0, "damaged tag rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
