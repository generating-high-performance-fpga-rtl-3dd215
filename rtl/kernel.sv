// kernel: example user kernel for the dinner query.
//
// Query: for every person younger than age_threshold, output their name and
// the name of their favourite food (people.food_id looked up in foods.id).
// The framework leaves the kernel to the user; the query comes from the
// document's example, the way this kernel computes it is this design's own.
//
// Operation, after a start pulse:
//  1. Load: command the whole foods range on foods.id and foods.name and
//     store up to FOODS_MAX rows (id, name of up to NAME_MAX characters;
//     longer names are cut, extra rows ignored) in local registers.
//  2. Count: command people.age and count the matching people, N. The writer
//     needs to know which output row is the last one, so it is counted first.
//  3. Produce: command people.name, people.age, people.food_id and the
//     dinner rows [dinner_first, dinner_first + N) on dinner.name and
//     dinner.food. Per person the age, food id and name length are taken
//     together; a match forwards the name characters to dinner.name and then
//     streams the stored food name (empty if the id is unknown) to
//     dinner.food; a non-match drops the characters.
//  4. Wait until every command has unlocked, then report done with
//     result = N. If N is 0 no dinner command is issued.
// stop and reset pulses return the kernel to idle at once (reset also clears
// done and result). Character streams carry EPC characters per beat, count,
// and last at the end of each string.
module kernel
  import fletcher_pkg::*;
#(
  parameter int EPC       = 1,
  parameter int FOODS_MAX = 16,
  parameter int NAME_MAX  = 32,
  parameter int CW        = $clog2(EPC + 1)
) (
  input  logic clk,
  input  logic rst,
  // Control and status
  input  logic start, stop, reset,
  output logic idle, busy, done,
  output logic [63:0] result,
  // RecordBatch metadata and custom register
  input  logic [INDEX_W-1:0] foods_firstidx, foods_lastidx,
  input  logic [INDEX_W-1:0] people_firstidx, people_lastidx,
  input  logic [INDEX_W-1:0] dinner_firstidx,
  input  logic [31:0]        age_threshold,
  // Commands (index 0 foods.id, 1 foods.name, 2 people.name, 3 people.age,
  // 4 people.food_id, 5 dinner.name, 6 dinner.food) and their unlocks
  output logic [6:0] cmd_valid,
  input  logic [6:0] cmd_ready,
  output kern_cmd_t  cmd [7],
  input  logic [6:0] unl_valid,
  output logic [6:0] unl_ready,
  // foods.id
  input  logic        foods_id_valid, foods_id_last,
  output logic        foods_id_ready,
  input  logic [15:0] foods_id,
  // foods.name lengths and characters
  input  logic               foods_name_valid, foods_name_last,
  output logic               foods_name_ready,
  input  logic [INDEX_W-1:0] foods_name_length,
  input  logic               foods_name_chars_valid, foods_name_chars_last,
  output logic               foods_name_chars_ready,
  input  logic [EPC*8-1:0]   foods_name_chars,
  input  logic [CW-1:0]      foods_name_chars_count,
  // people.name lengths and characters
  input  logic               people_name_valid, people_name_last,
  output logic               people_name_ready,
  input  logic [INDEX_W-1:0] people_name_length,
  input  logic               people_name_chars_valid, people_name_chars_last,
  output logic               people_name_chars_ready,
  input  logic [EPC*8-1:0]   people_name_chars,
  input  logic [CW-1:0]      people_name_chars_count,
  // people.age, people.food_id
  input  logic        people_age_valid, people_age_last,
  output logic        people_age_ready,
  input  logic [7:0]  people_age,
  input  logic        people_food_id_valid, people_food_id_last,
  output logic        people_food_id_ready,
  input  logic [15:0] people_food_id,
  // dinner.name, dinner.food (lengths and characters)
  output logic               dinner_name_valid, dinner_name_last,
  input  logic               dinner_name_ready,
  output logic [INDEX_W-1:0] dinner_name_length,
  output logic               dinner_name_chars_valid, dinner_name_chars_last,
  input  logic               dinner_name_chars_ready,
  output logic [EPC*8-1:0]   dinner_name_chars,
  output logic [CW-1:0]      dinner_name_chars_count,
  output logic               dinner_food_valid, dinner_food_last,
  input  logic               dinner_food_ready,
  output logic [INDEX_W-1:0] dinner_food_length,
  output logic               dinner_food_chars_valid, dinner_food_chars_last,
  input  logic               dinner_food_chars_ready,
  output logic [EPC*8-1:0]   dinner_food_chars,
  output logic [CW-1:0]      dinner_food_chars_count
);
  localparam int SW = $clog2(FOODS_MAX + 1);
  localparam int NW = $clog2(NAME_MAX + 1);

  typedef enum logic [3:0] {
    K_IDLE, K_LOAD_CMD, K_LOAD_HDR, K_LOAD_CHARS, K_COUNT_CMD, K_COUNT,
    K_PROD_CMD, K_ROW_HDR, K_SKIP, K_NAME_LEN, K_NAME_CHARS, K_FOOD_LEN,
    K_FOOD_CHARS, K_WAIT_UNL, K_DONE
  } kstate_e;

  kstate_e st;
  logic [6:0]  sent;                         // commands of this phase issued
  logic [31:0] issued, unlocked;             // command / unlock counters
  logic [15:0] food_ids   [FOODS_MAX];
  logic [NW-1:0] food_len [FOODS_MAX];
  logic [7:0]  food_name  [FOODS_MAX][NAME_MAX];
  logic [SW-1:0] n_foods;
  logic [NW-1:0] pos;
  logic          row_last;
  logic [31:0]   n_match, k_match;
  logic [SW-1:0] hit_slot;
  logic          hit;
  logic [NW-1:0] flen;
  logic [15:0]   cur_food;
  logic [INDEX_W-1:0] people_len_q;

  // ---------------- commands ----------------
  logic [6:0] want;
  always_comb begin
    want = '0;
    case (st)
      K_LOAD_CMD:  want = 7'b0000011;
      K_COUNT_CMD: want = 7'b0001000;
      K_PROD_CMD:  want = 7'b1111100;
      default: ;
    endcase
    cmd_valid = want & ~sent;
    cmd[0] = '{first_idx: foods_firstidx,  last_idx: foods_lastidx,  tag: '0};
    cmd[1] = cmd[0];
    cmd[2] = '{first_idx: people_firstidx, last_idx: people_lastidx, tag: '0};
    cmd[3] = cmd[2];
    cmd[4] = cmd[2];
    cmd[5] = '{first_idx: dinner_firstidx, last_idx: dinner_firstidx + n_match, tag: '0};
    cmd[6] = cmd[5];
    unl_ready = '1;
  end

  // ---------------- food lookup (associative search) ----------------
  always_comb begin
    hit = 1'b0;
    hit_slot = '0;
    for (int s = 0; s < FOODS_MAX; s++)
      if (!hit && (SW'(s) < n_foods) && food_ids[s] == cur_food) begin
        hit = 1'b1;
        hit_slot = SW'(s);
      end
    flen = hit ? food_len[hit_slot] : '0;
  end

  // ---------------- stream handshakes ----------------
  logic match_now;
  assign match_now = (32'(people_age) < age_threshold);

  always_comb begin
    foods_id_ready          = 1'b0;
    foods_name_ready        = 1'b0;
    foods_name_chars_ready  = 1'b0;
    people_name_ready       = 1'b0;
    people_name_chars_ready = 1'b0;
    people_age_ready        = 1'b0;
    people_food_id_ready    = 1'b0;
    dinner_name_valid       = 1'b0;
    dinner_name_last        = (k_match + 1 == n_match);
    dinner_name_length      = people_len_q;
    dinner_name_chars_valid = 1'b0;
    dinner_name_chars       = people_name_chars;
    dinner_name_chars_count = people_name_chars_count;
    dinner_name_chars_last  = people_name_chars_last;
    dinner_food_valid       = 1'b0;
    dinner_food_last        = (k_match + 1 == n_match);
    dinner_food_length      = INDEX_W'(flen);
    dinner_food_chars_valid = 1'b0;
    dinner_food_chars       = '0;
    dinner_food_chars_count = '0;
    dinner_food_chars_last  = 1'b0;
    for (int e = 0; e < EPC; e++)
      if (32'(pos) + e < 32'(flen)) begin
        dinner_food_chars[e*8 +: 8] = food_name[hit_slot][32'(pos) + e];
        dinner_food_chars_count     = CW'(e + 1);
      end
    dinner_food_chars_last = (32'(pos) + 32'(dinner_food_chars_count) >= 32'(flen));
    case (st)
      K_LOAD_HDR: begin
        foods_id_ready   = foods_id_valid && foods_name_valid;
        foods_name_ready = foods_id_valid && foods_name_valid;
      end
      K_LOAD_CHARS: foods_name_chars_ready = 1'b1;
      K_COUNT:      people_age_ready = 1'b1;
      K_ROW_HDR: begin
        people_age_ready     = people_age_valid && people_food_id_valid && people_name_valid;
        people_food_id_ready = people_age_ready;
        people_name_ready    = people_age_ready;
      end
      K_SKIP:      people_name_chars_ready = 1'b1;
      K_NAME_LEN:  dinner_name_valid = 1'b1;
      K_NAME_CHARS: begin
        dinner_name_chars_valid = people_name_chars_valid;
        people_name_chars_ready = dinner_name_chars_ready;
      end
      K_FOOD_LEN:   dinner_food_valid = 1'b1;
      K_FOOD_CHARS: dinner_food_chars_valid = 1'b1;
      default: ;
    endcase
  end

  // ---------------- control ----------------
  assign idle = (st == K_IDLE);
  assign done = (st == K_DONE);
  assign busy = !idle && !done;

  always_ff @(posedge clk) begin
    if (rst || reset) begin
      st       <= K_IDLE;
      sent     <= '0;
      issued   <= '0;
      unlocked <= '0;
      n_foods  <= '0;
      n_match  <= '0;
      k_match  <= '0;
      pos      <= '0;
      row_last <= 1'b0;
      result   <= '0;
      cur_food <= '0;
      people_len_q <= '0;
    end else if (stop) begin
      st <= K_IDLE;
    end else begin
      unlocked <= unlocked + 32'($countones(unl_valid & unl_ready));
      if (|(cmd_valid & cmd_ready)) begin
        sent   <= sent | (cmd_valid & cmd_ready);
        issued <= issued + 32'($countones(cmd_valid & cmd_ready));
      end
      case (st)
        K_IDLE, K_DONE: if (start) begin
          st       <= (foods_lastidx > foods_firstidx) ? K_LOAD_CMD : K_COUNT_CMD;
          sent     <= '0;
          issued   <= '0;
          unlocked <= '0;
          n_foods  <= '0;
          n_match  <= '0;
          k_match  <= '0;
        end
        K_LOAD_CMD: if ((sent | (cmd_valid & cmd_ready)) == want) begin
          sent <= '0;
          st   <= K_LOAD_HDR;
        end
        K_LOAD_HDR: if (foods_id_ready) begin
          if (32'(n_foods) < FOODS_MAX) begin
            food_ids[n_foods] <= foods_id;
            food_len[n_foods] <= (foods_name_length > INDEX_W'(NAME_MAX)) ? NW'(NAME_MAX) : NW'(foods_name_length);
          end
          row_last <= foods_id_last;
          pos      <= '0;
          st       <= K_LOAD_CHARS;
        end
        K_LOAD_CHARS: if (foods_name_chars_valid) begin
          for (int e = 0; e < EPC; e++)
            if (e < int'(foods_name_chars_count) && 32'(pos) + e < NAME_MAX && 32'(n_foods) < FOODS_MAX)
              food_name[n_foods][32'(pos) + e] <= foods_name_chars[e*8 +: 8];
          pos <= pos + NW'(foods_name_chars_count);
          if (foods_name_chars_last) begin
            if (32'(n_foods) < FOODS_MAX) n_foods <= n_foods + 1'b1;
            st <= row_last ? K_COUNT_CMD : K_LOAD_HDR;
          end
        end
        K_COUNT_CMD: begin
          if (people_lastidx <= people_firstidx) st <= K_WAIT_UNL;
          else if ((sent | (cmd_valid & cmd_ready)) == want) begin
            sent <= '0;
            st   <= K_COUNT;
          end
        end
        K_COUNT: if (people_age_valid) begin
          if (match_now) n_match <= n_match + 1;
          if (people_age_last) st <= (n_match + (match_now ? 1 : 0) == 0) ? K_WAIT_UNL : K_PROD_CMD;
        end
        K_PROD_CMD: if ((sent | (cmd_valid & cmd_ready)) == want) begin
          sent <= '0;
          st   <= K_ROW_HDR;
        end
        K_ROW_HDR: if (people_age_ready) begin
          cur_food     <= people_food_id;
          people_len_q <= people_name_length;
          row_last     <= people_age_last;
          pos          <= '0;
          st           <= match_now ? K_NAME_LEN : K_SKIP;
        end
        K_SKIP: if (people_name_chars_valid && people_name_chars_last)
          st <= row_last ? K_WAIT_UNL : K_ROW_HDR;
        K_NAME_LEN: if (dinner_name_ready) st <= K_NAME_CHARS;
        K_NAME_CHARS: if (people_name_chars_valid && dinner_name_chars_ready && people_name_chars_last)
          st <= K_FOOD_LEN;
        K_FOOD_LEN: if (dinner_food_ready) st <= K_FOOD_CHARS;
        K_FOOD_CHARS: if (dinner_food_chars_ready) begin
          pos <= pos + NW'(dinner_food_chars_count);
          if (dinner_food_chars_last) begin
            k_match <= k_match + 1;
            st      <= row_last ? K_WAIT_UNL : K_ROW_HDR;
          end
        end
        K_WAIT_UNL: if (unlocked == issued) begin
          st     <= K_DONE;
          result <= 64'(n_match);
        end
        default: st <= K_IDLE;
      endcase
    end
  end
endmodule
