// flash_param_parser: reads the flash parameter table kept in the reserved
// area of the flash, so that one controller can drive different NAND parts.
//
// The table starts with a start tag and ends with an end-of-table flag, and
// holds the operating parameters of the flash part: total capacity, total
// physical blocks, pages per block. This design's encoding: the 4-byte start
// tag START_TAG (sent first byte first), then records of one id byte and a
// 4-byte little-endian value, and finally the id END_ID as end-of-table flag.
// Ids: 1 total capacity (sectors), 2 total physical blocks, 3 pages per
// block; other ids are skipped. Bytes before the tag are ignored.
//
// Interface: clear restarts the search; bytes arrive on in_valid/in_data (the
// parser is always ready). table_valid rises on the end flag and the value
// outputs hold what the table gave (zero for a missing entry).
module flash_param_parser #(
  parameter logic [31:0] START_TAG = 32'h4650_524D,   // "FPRM"
  parameter logic [7:0]  END_ID    = 8'hFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        table_valid,
  output logic [31:0] total_capacity,
  output logic [31:0] total_blocks,
  output logic [31:0] pages_per_block
);
  typedef enum logic [1:0] {P_TAG, P_ID, P_VALUE, P_END} pstate_e;
  pstate_e     st;
  logic [31:0] tag_sr;
  logic [7:0]  id;
  logic [31:0] value;
  logic [1:0]  vcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_TAG; tag_sr <= '0; id <= '0; value <= '0; vcnt <= '0;
      table_valid <= 1'b0;
      total_capacity <= '0; total_blocks <= '0; pages_per_block <= '0;
    end else if (clear) begin
      st <= P_TAG; tag_sr <= '0; vcnt <= '0;
      table_valid <= 1'b0;
      total_capacity <= '0; total_blocks <= '0; pages_per_block <= '0;
    end else if (in_valid) begin
      unique case (st)
        P_TAG: begin
          tag_sr <= {tag_sr[23:0], in_data};
          if ({tag_sr[23:0], in_data} == START_TAG) st <= P_ID;
        end
        P_ID: begin
          id <= in_data;
          vcnt <= '0;
          if (in_data == END_ID) begin
            st <= P_END;
            table_valid <= 1'b1;
          end else begin
            st <= P_VALUE;
          end
        end
        P_VALUE: begin
          value <= {in_data, value[31:8]};
          vcnt <= vcnt + 1'b1;
          if (vcnt == 2'd3) begin
            st <= P_ID;
            unique case (id)
              8'd1:    total_capacity  <= {in_data, value[31:8]};
              8'd2:    total_blocks    <= {in_data, value[31:8]};
              8'd3:    pages_per_block <= {in_data, value[31:8]};
              default: ;
            endcase
          end
        end
        default: ;   // P_END: ignore the rest of the sector
      endcase
    end
  end
endmodule
