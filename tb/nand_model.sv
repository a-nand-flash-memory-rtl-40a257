// nand_model: behavioural model of one x8 large-page NAND flash chip for the
// testbenches (not synthesizable, not part of the controller).
//
// Commands: FFh reset; 00h + 4 address cycles + 30h page read (busy T_R);
// 80h + 4 address cycles + data + 10h page program (busy T_PROG, programming
// can only clear bits); 60h + 2 row cycles + D0h block erase of PAGES_PER_BLOCK
// pages (busy T_BERS); 70h read status (bit 0 = fail, bit 6 = ready).
// Address: column low, column high, row low, row high. Command, address and
// data bytes are latched on the rising edge of WE#, read data is driven from
// the falling edge of RE#. Unwritten locations read as FFh. The testbench may
// call flip_bit() to corrupt stored data and set fail_next to make the next
// program or erase report a failure.
module nand_model #(
  parameter int PAGE_BYTES      = 2112,
  parameter int PAGES_PER_BLOCK = 64,
  parameter int T_R             = 250,
  parameter int T_PROG          = 400,
  parameter int T_BERS          = 600
) (
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] io_in,
  output logic [7:0] io_out,
  output logic       rb_n
);
  logic [7:0] mem [int];
  logic [7:0] pagebuf [PAGE_BYTES];
  logic [7:0] last_cmd = 8'hFF;
  logic [7:0] addr [4];
  int  acnt = 0, col = 0;
  bit  status_mode = 0, fail = 0;
  bit  fail_next = 0;
  int  programs = 0, erases = 0, reads = 0;

  initial begin rb_n = 1; io_out = 8'h00; end

  function automatic int row_of();
    return {addr[3], addr[2]};
  endfunction

  task automatic flip_bit(int row, int c, int bit_no);
    int k = row * 4096 + c;
    logic [7:0] v = mem.exists(k) ? mem[k] : 8'hFF;
    mem[k] = v ^ (8'h01 << bit_no);
  endtask

  function automatic logic [7:0] peek(int row, int c);
    int k = row * 4096 + c;
    return mem.exists(k) ? mem[k] : 8'hFF;
  endfunction

  task automatic busy(int t);
    rb_n = 0;
    #(t);
    rb_n = 1;
  endtask

  always @(posedge we_n) if (!ce_n) begin
    if (cle) begin
      last_cmd = io_in;
      status_mode = 0;
      unique case (io_in)
        8'hFF: begin fork busy(20); join_none end
        8'h00, 8'h80, 8'h60: begin
          acnt = 0;
          if (io_in == 8'h80) foreach (pagebuf[i]) pagebuf[i] = 8'hFF;
          if (io_in == 8'h60) acnt = 2;
        end
        8'h30: begin
          reads++;
          col = {addr[1], addr[0]};
          for (int i = 0; i < PAGE_BYTES; i++) pagebuf[i] = peek(row_of(), i);
          fork busy(T_R); join_none
        end
        8'h10: begin
          programs++;
          fail = fail_next; fail_next = 0;
          if (!fail)
            for (int i = 0; i < PAGE_BYTES; i++)
              if (pagebuf[i] != 8'hFF) mem[row_of() * 4096 + i] = peek(row_of(), i) & pagebuf[i];
          fork busy(T_PROG); join_none
        end
        8'hD0: begin
          erases++;
          fail = fail_next; fail_next = 0;
          if (!fail)
            for (int p = 0; p < PAGES_PER_BLOCK; p++)
              for (int i = 0; i < PAGE_BYTES; i++)
                if (mem.exists(((row_of() / PAGES_PER_BLOCK) * PAGES_PER_BLOCK + p) * 4096 + i))
                  mem.delete(((row_of() / PAGES_PER_BLOCK) * PAGES_PER_BLOCK + p) * 4096 + i);
          fork busy(T_BERS); join_none
        end
        8'h70: status_mode = 1;
        default: ;
      endcase
    end else if (ale) begin
      if (acnt < 4) addr[acnt] = io_in;
      acnt++;
      if (acnt == 2 && last_cmd == 8'h80) col = {addr[1], addr[0]};
    end else if (last_cmd == 8'h80) begin
      if (col < PAGE_BYTES) pagebuf[col] = io_in;
      col++;
    end
  end

  always @(negedge re_n) if (!ce_n) begin
    if (status_mode) io_out = {1'b1, rb_n, 5'b0, fail};
    else begin
      io_out = (col < PAGE_BYTES) ? pagebuf[col] : 8'hFF;
      col++;
    end
  end
endmodule
