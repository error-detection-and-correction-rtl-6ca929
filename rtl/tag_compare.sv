// tag_compare: hit logic of one set of the 4-way tag directory.
//
// The lookup tag is compared with the tags as stored (raw) and with the tags
// after correction. The hit and hit way come from the corrected tags, leaving
// out ways whose error could not be corrected. Comparing both versions shows
// the tag-error effects of the source description:
//   pseudo_hit  - a stored tag matches only because it is corrupted
//                 (the corrected tags miss in that way),
//   pseudo_miss - the stored tags miss, the corrected tags hit,
//   multi_hit   - more than one stored tag matches in the set.
// When several corrected ways match, the lowest wins. The names of the
// effects follow the source; how they are derived is this design's choice.
//
// Timing: purely combinational.
module tag_compare
  import sti_pkg::*;
(
  input  tag_t            lookup_tag,
  input  tag_row_t        raw_tags,     // tags as read from the array
  input  tag_row_t        cor_tags,     // tags after correction
  input  logic [WAYS-1:0] due,          // ways with an uncorrectable error
  output logic            hit,
  output way_t            hit_way,
  output logic            multi_hit,
  output logic            pseudo_hit,
  output logic            pseudo_miss
);

  logic [WAYS-1:0] raw_match, cor_match;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      raw_match[w] = raw_tags[w] == lookup_tag;
      cor_match[w] = (cor_tags[w] == lookup_tag) && !due[w];
    end
    hit     = |cor_match;
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (cor_match[w]) hit_way = way_t'(w);
    multi_hit   = $countones(raw_match) > 1;
    pseudo_hit  = |(raw_match & ~cor_match & ~due);
    pseudo_miss = !(|raw_match) && hit;
  end

endmodule
